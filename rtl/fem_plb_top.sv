// fem_plb_top: the feature extraction module as attached to a 32-bit
// processor bus.
//
// A processor writes each update or estimate call as four 32-bit words (see
// fem_input_stage for the layout); the input stage assembles them into a
// packet record and hands it to the FEM core, which hashes it in all feature
// sketches and updates or reads the sketch tables. Estimates come out with the
// feature sketch id they were asked for. With the default configuration
// (four sketches: (dst IP, dst port), dst IP, src IP, (src IP, dst IP), each
// counting SYN minus ACK; four hash functions per sketch; 1024-entry tables)
// the counters give the number of half-open connections per key.
// The bus itself, the processor and its memories are outside this module: a
// plain valid/ready word stream stands where a bus slave would attach.
//
// Timing: one word per cycle, so one call per four cycles; an estimate
// appears FEM_LAT = 17 cycles after its record enters the core (the cycle
// after its fourth word). busy is high during the K-cycle table clear after
// reset or a clear pulse.
module fem_plb_top
  import fem_pkg::*;
#(
  parameter int unsigned          FS  = 4,
  parameter int unsigned          H   = 4,
  parameter int unsigned          K   = 1024,
  parameter int unsigned          VW  = 16,
  parameter fs_cfg_t [MAX_FS-1:0] CFG = DEFAULT_CFG,
  localparam int unsigned         FSW = (FS > 1) ? $clog2(FS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 word_valid,
  output logic                 word_ready,
  input  logic [31:0]          word_data,
  output logic                 est_valid,
  output logic [FSW-1:0]       est_fs_id,
  output logic signed [VW-1:0] est_value,
  output logic                 busy
);

  logic       rec_valid, rec_ready;
  fem_op_e    rec_op;
  pkt_key_t   rec_key;
  flags_t     rec_flags;
  logic [7:0] rec_fs_id;

  fem_input_stage u_in (
    .clk, .rst_n, .word_valid, .word_ready, .word_data,
    .rec_valid, .rec_ready, .rec_op, .rec_key, .rec_flags, .rec_fs_id
  );

  fem #(.FS(FS), .H(H), .K(K), .VW(VW), .CFG(CFG)) u_fem (
    .clk, .rst_n, .clear,
    .in_valid(rec_valid), .in_ready(rec_ready),
    .in_op(rec_op), .in_key(rec_key), .in_flags(rec_flags), .in_fs_id(rec_fs_id[FSW-1:0]),
    .est_valid, .est_fs_id, .est_value, .busy
  );

endmodule
