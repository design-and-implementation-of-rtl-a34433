# Network feature extraction module (FEM) in SystemVerilog

A network intrusion detector that looks for anomalies first has to condense
the traffic into a few numbers per host, port or host pair, at line rate.
This design does that condensation in hardware with **feature sketches**. A
feature sketch is a count-min sketch: a set of H counter tables, each indexed
by a different hash of the same key. Each sketch watches one *feature*, a
choice of key fields plus a rule that turns the packet's TCP flags into +1, -1
or 0. In the default configuration every sketch counts `SYN - ACK`: a TCP
connection request adds one and the completing ACK takes it away again. What
is left in a counter is therefore the number of half-open connections for that
key, and half-open connections are what SYN floods, spoofed floods,
distributed floods and port scans all leave behind.

The module runs four such sketches side by side on every packet header:

| sketch | key                      | a high count means                                   |
|--------|--------------------------|------------------------------------------------------|
| FS1    | (dst IP, dst port)       | this port of this host is being flooded or probed    |
| FS2    | dst IP                   | this host is a victim (flood, distributed flood, scan) |
| FS3    | src IP                   | this source opens many connections it never completes |
| FS4    | (src IP, dst IP)         | this source is the one attacking that host           |

Reading them together separates the cases. A host high in FS2 with one source
high in FS4 is under a SYN flood from that source. A host high in FS2 with no
source high in FS4 is under a distributed or spoofed flood. A source high in
FS3 but spread thinly over FS4 is scanning many machines. That
classification step is not part of this RTL: it is software that reads the
estimates.

The architecture follows the FEM described in the article *Design and
Implementation of an FPGA Architecture for High-Speed Network Feature
Extraction*. The source comments call it "the published design". The Jenkins
hash pipeline, the sketch structure, the minimum estimator and the four-sketch
application come from there. The handshakes, the table memory timing, the
counter width, the clear mechanism and the bus word format are this design's
own choices. They are listed in "Departures and own choices" below.

## Operation: two calls

The FEM accepts two kinds of call, one per clock cycle:

* **update** `(src_ip, dst_ip, src_port, dst_port, flags)`. Every sketch hashes
  its own selection of the key fields with all H hash functions. It then adds
  its flag value to the addressed counter in each of its H tables. No response.
* **estimate** `(src_ip, dst_ip, src_port, dst_port, fs_id)`. Every sketch reads
  its H addressed counters and takes their minimum. The output control block
  returns the minimum of sketch `fs_id`.

Hash collisions can only *add* other flows' counts to a counter. The minimum
over H independently hashed rows is therefore the estimate that is least
inflated. With the SYN - ACK rule, counters can also go negative, so a
collision can lower a row as well; the minimum is still the rule used.

Calls complete in order. An estimate sees every update accepted before it,
including one accepted in the cycle just before it (see "Sketch tables").

## Block structure

```
fem_plb_top
 ├─ fem_input_stage          4 x 32-bit words  ->  one call record
 └─ fem                      FS sketches in parallel + output control
     ├─ feature_sketch [FS]
     │   ├─ hash_control     key-field select (unused fields -> 0), flags -> +1/-1/0
     │   ├─ jenkins_hash [H] 13-stage pipeline, one seed per row
     │   │   ├─ jenkins_init
     │   │   └─ jenkins_mix_sub x 6
     │   ├─ sketch_table [H] K counters, read-modify-write
     │   └─ estimate_block   minimum of the H rows
     └─ output_control       picks the estimate of sketch fs_id
```

`fem_pkg` holds the shared types, the default sketch configurations, the hash
constants and the pipeline latencies.

## The pipelined Jenkins hash

Each row of each sketch has its own copy of Bob Jenkins' 32-bit hash of three
32-bit keys:

```
A = B = 0x9e3779b9;  C = seed;   A += K0;  B += K1;  C += K2;
mix(A,B,C); mix(A,B,C);          hash = C
mix:  a = (a-b-c) ^ (c>>13);  b = (b-c-a) ^ (a<<8);   c = (c-a-b) ^ (b>>13);
      a = (a-b-c) ^ (c>>12);  b = (b-c-a) ^ (a<<16);  c = (c-a-b) ^ (b>>5);
      a = (a-b-c) ^ (c>>3);   b = (b-c-a) ^ (a<<10);  c = (c-a-b) ^ (b>>15);
```

The eighteen rows are cut into 13 pipeline stages. No stage has more than
three chained add, subtract or XOR operators. The trick that makes this fit is
that the `a` signal between stages carries **a - b** rather than `a`. Each
`a` row then needs only one more subtraction.

* **Initialization stage** (`jenkins_init`, 1 register). It outputs
  `a - b = K0 - K1` (the golden ratio cancels), `b = K1 + 0x9e3779b9` and
  `c = K2 + seed`.
* **Mix sub-block** (`jenkins_mix_sub`, 2 registers, shifts `SA, SB, SC`).
  It computes three rows:
  * stage 1: `a1 = (amb - c) ^ (c >> SA)`, `bp = b - c - a1`, `cp = c - a1`
  * stage 2: `b1 = bp ^ (a1 << SB)`, `c1 = (cp - b1) ^ (b1 >> SC)`, and
    `amb' = a1 - b1`, the pre-subtraction for the next sub-block.
* **Hash** (`jenkins_hash`). It chains the init stage and six sub-blocks, with
  shifts (13,8,13), (12,16,5), (3,10,15), (13,8,13), (12,16,5), (3,10,15).
  The result is `c` after the sixth sub-block: 1 + 6 x 2 = 13 cycles after the
  keys.

The testbenches compare this pipeline with a plain sequential model of the
hash above, so the regrouping is checked bit for bit.

Seeds: row `h` of sketch `f` uses `seed = (64*f + h + 1) * 0x85ebca6b mod 2^32`.
This gives every hash function in the module a different seed. The table
address is the low `log2(K)` bits of the hash.

## Sketch tables

A table (`sketch_table`) holds K signed counters of VW bits, written as a
memory array with a registered read, so it maps onto block RAM. A request
passes two stages:

1. The address is registered and the memory is read.
2. For an update, `stored + value` is written back, saturating at the
   VW-bit limits. For an estimate, the stored value is registered as the
   result.

If two consecutive requests hit the same counter, the second one's read
happens in the same cycle as the first one's write and would see the old
value. A compare on the addresses detects this. The value being written is
then forwarded into the second request. Updates of one flow can therefore
arrive every cycle and still be counted exactly.

**Clearing.** A reset, or a one-cycle pulse on `clear`, zeroes the table with a
sweep of one entry per cycle. `busy` (and `in_ready` low at the FEM) lasts K
cycles. A request that reaches the write stage during the sweep is dropped,
and an estimate then reads 0. The core holds off new calls while `busy` is
high, so in normal use only calls already in the hash pipeline when `clear`
is pulsed are affected. A clear marks the start of a new measurement interval.

## Configuring the sketches

The sketches are set by one parameter, `CFG`, an array of `fs_cfg_t` (slot `i`
configures sketch `i`, up to 16 sketches):

```systemverilog
typedef struct packed {
  logic [3:0] key_sel;   // [0] src IP, [1] dst IP, [2] src port, [3] dst port
  flags_t     inc_mask;  // any of these flags set: +1
  flags_t     dec_mask;  // any of these flags set: -1 (both: 0)
} fs_cfg_t;
```

Fields that are not selected are replaced by zero before hashing. The hash
keys are `K0 = src IP`, `K1 = dst IP`, `K2 = {src port, dst port}`. Flags use the
TCP header order: bit 5..0 = URG ACK PSH RST SYN FIN. A traffic-volume feature,
for example, would count `SYN - FIN`. Pipeline timing does not depend on the
configuration.

## Bus attachment: the 32-bit input stage

The core takes one whole call record per cycle (102 bits). On a 32-bit
processor bus, a call arrives as four words, which `fem_input_stage` collects:

| word | bits                                                        |
|------|-------------------------------------------------------------|
| 0    | source IP                                                   |
| 1    | destination IP                                              |
| 2    | `[31:16]` source port, `[15:0]` destination port            |
| 3    | `[31]` op (0 update, 1 estimate), `[15:8]` fs_id, `[5:0]` flags |

Words 0 to 2 go into a staging register, and word 3 moves the call to the
output register. The next call's words can therefore come in while the core
still holds the previous call. Only the fourth word waits, and only when the
core is not ready (during a clear). At full rate the top takes one call every
four cycles, which is 32 bits per clock. The processor, the bus protocol and
the memories around it are not part of this RTL. `fem_plb_top` exposes a plain
valid/ready word port where a bus slave would sit.

## Interfaces and timing

`fem_plb_top` ports: `clk`, `rst_n` (active-low, synchronous), `clear`, the word
stream `word_valid / word_ready / word_data[31:0]`, and the result
`est_valid / est_fs_id / est_value` (signed VW bits), plus `busy`.

`fem` ports are the same, but with a record instead of words:
`in_valid / in_ready / in_op / in_key / in_flags / in_fs_id`.

| path                                            | cycles |
|-------------------------------------------------|--------|
| hash keys -> hash value (`HASH_LAT`)            | 13     |
| table request -> estimate value (`TABLE_LAT`)   | 2      |
| minimum (`EST_LAT`)                             | 1      |
| feature sketch call -> estimate (`FS_LAT`)      | 16     |
| FEM call accepted -> `est_valid` (`FEM_LAT`)    | 17     |
| top: 4th word accepted -> `est_valid`           | 18     |
| clear after reset or `clear` pulse              | K      |

Cycle counts are register stages: a value sampled at clock edge n appears
after edge n + latency - 1.

## Parameters and size

| parameter | default | meaning |
|-----------|---------|---------|
| `FS`  | 4    | feature sketches (the four-sketch application above) |
| `H`   | 4    | hash functions / tables per sketch |
| `K`   | 1024 | counters per table (power of two) |
| `VW`  | 16   | counter width, signed, saturating |
| `CFG` | `DEFAULT_CFG` | sketch configurations (FS1..FS4, repeated for larger FS) |

At the defaults there are 16 hash pipelines and 16 tables of 1024 x 16 bits
(256 kbit of counter memory). Each hash pipeline has 38 32-bit adders or
subtractors, 18 XORs and about 1200 flip-flop bits. Area grows linearly with
FS x H. Table size moves only memory, not logic.

The original work reports a Virtex-II Pro implementation at about 100 MHz for
all configurations FS, H in {1, 2, 4} and K from 1024 to 16384. Through the
32-bit bus that is about 3.2 to 3.3 Gbit/s; the core alone takes four times
that. Those configurations are all parameter settings of this RTL. Timing
closure has not been tried on any device here.

## Departures and own choices

Followed: the 13-stage hash with its stage cut, field zeroing, the +1 SYN / -1
ACK update rule, the minimum estimate, the selection by sketch id, the
four-sketch application, and the 32-bit-per-cycle input stage.

This design's own choices:
* the golden ratio 0x9e3779b9 and the seed formula;
* the assignment of fields to hash keys and the flag bit order;
* the table address taken from the low hash bits;
* the 16-bit saturating counters;
* the forwarding path;
* the clear sweep and the `clear` input;
* the valid/ready handshakes and the word layout of the input stage;
* the value rule generalised to increment/decrement masks.

Not included: the embedded processor, its bus, memories and DDR controller,
which surround the FEM on the evaluation board. Also not included is the
anomaly classification that reads the estimates.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/tb_ref_pkg.sv` holds the reference models:
a sequential Jenkins hash and a software FEM with the same seeds and
configurations. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fem_pkg.sv tb/tb_ref_pkg.sv tb/tb_fem_plb_top.sv \
    --top-module tb_fem_plb_top -o sim
./obj_dir/sim
```

Replace `tb_fem_plb_top` with any other testbench name.

* `tb_jenkins_init`, `tb_jenkins_mix_sub`, `tb_jenkins_hash`: bit-exact
  against the sequential hash, including the 13-cycle latency.
* `tb_hash_control`: field zeroing and flag values of the four configurations.
* `tb_sketch_table`: random traffic against a software table, back-to-back
  updates of one counter (forwarding), saturation at both limits with 4-bit
  counters, and clear.
* `tb_estimate_block`, `tb_output_control`: minimum and selection.
* `tb_feature_sketch`, `tb_fem`: random calls every cycle against the software
  FEM, latency, and clear. `tb_fem` uses 64-entry tables so that collisions
  happen and the minimum has something to filter.
* `tb_fem_configs` (with its helper `tb_fem_cfg_run`): the core in all
  thirteen evaluated sizes, FS and H in {1, 2, 4} with K = 1024, and FS = H = 2
  with K from 2048 to 16384. It runs random calls at one per cycle against the
  software FEM. Building it takes a few minutes because it elaborates thirteen
  cores.
* `tb_fem_input_stage`: word assembly under random gaps and back-pressure, and
  one record per four cycles at full rate.
* `tb_fem_plb_top`: end to end at the default size through the 32-bit port.
  It sends completed handshakes, a SYN flood, a port scan and a spoofed
  distributed flood. It checks every estimate against the software FEM and
  checks the readings the four-sketch application relies on. It also checks
  full-rate throughput, stalls during the clear after reset, and zeroed
  sketches after a mid-run clear. It runs in well under a second.

All simulation is two-state. The RTL resets every control register, and the
tables are zeroed by the clear sweep before use.
