// feature_sketch: one feature sketch of the FEM.
//
// The hash control block selects this sketch's key fields and turns the flags
// into a +1/-1/0 value. H Jenkins hash pipelines with different seeds hash the
// same keys in parallel; the low log2(K) bits of hash h address sketch table h.
// An update adds the value to the addressed counter of every table; an
// estimate reads the addressed counters and the estimate block returns their
// minimum (count-min sketch). This is the published design's feature sketch; the seeds
// and the use of the low hash bits as the address are this design's choices.
//
// Timing: one request per cycle with no stall; estimate result FS_LAT = 16
// cycles after the request (13 hash + 2 table + 1 minimum). busy is high while
// the tables are being cleared; requests then are dropped.
module feature_sketch
  import fem_pkg::*;
#(
  parameter int unsigned FS_IDX = 0,
  parameter int unsigned H      = 4,
  parameter int unsigned K      = 1024,
  parameter int unsigned VW     = 16,
  parameter fs_cfg_t     CFG    = FS1_CFG,
  localparam int unsigned AW    = (K > 1) ? $clog2(K) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  input  fem_op_e              in_op,
  input  pkt_key_t             in_key,
  input  flags_t               in_flags,
  output logic                 est_valid,
  output logic signed [VW-1:0] est_value,
  output logic                 busy
);

  logic [31:0]       key0, key1, key2;
  logic signed [1:0] delta;

  hash_control #(.CFG(CFG)) u_hctl (
    .key(in_key), .flags(in_flags), .key0, .key1, .key2, .delta
  );

  // op and value travel beside the hash pipelines
  fem_op_e           op_d    [HASH_LAT];
  logic signed [1:0] delta_d [HASH_LAT];

  always_ff @(posedge clk) begin
    op_d[0]    <= in_op;
    delta_d[0] <= delta;
    for (int i = 1; i < HASH_LAT; i++) begin
      op_d[i]    <= op_d[i-1];
      delta_d[i] <= delta_d[i-1];
    end
  end

  logic                 hv     [H];
  logic [31:0]          hval   [H];
  logic                 ev     [H];
  logic signed [VW-1:0] evalue [H];
  logic                 tbusy  [H];

  for (genvar h = 0; h < H; h++) begin : g_row
    jenkins_hash #(.SEED(seed_of(FS_IDX, h))) u_hash (
      .clk, .rst_n, .in_valid,
      .key0, .key1, .key2,
      .out_valid(hv[h]), .hash(hval[h])
    );

    sketch_table #(.K(K), .VW(VW)) u_table (
      .clk, .rst_n, .clear,
      .req_valid(hv[h]), .req_op(op_d[HASH_LAT-1]),
      .req_addr(hval[h][AW-1:0]), .req_delta(delta_d[HASH_LAT-1]),
      .est_valid(ev[h]), .est_value(evalue[h]), .busy(tbusy[h])
    );
  end

  estimate_block #(.H(H), .VW(VW)) u_est (
    .clk, .rst_n, .in_valid(ev[0]), .in_value(evalue),
    .out_valid(est_valid), .out_value(est_value)
  );

  // all rows run in lock step
  assign busy = tbusy[0];

endmodule
