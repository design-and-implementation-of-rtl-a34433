// jenkins_hash: 13-stage pipelined Bob Jenkins 32-bit hash of three keys.
//
// Hash value = c after A = B = golden ratio + (K0, K1), C = SEED + K2 and two
// calls of the mix function. The pipeline is the initialization stage (one
// register) followed by six mix sub-blocks (two registers each): sub-blocks
// 1-3 form the first mix call and 4-6 the second, each trio using the shift
// amounts (13,8,13), (12,16,5), (3,10,15). This is the published design's structure.
//
// Timing: a new key set every cycle; hash valid HASH_LAT = 13 cycles after
// in_valid. No stall, no back-pressure.
module jenkins_hash
  import fem_pkg::*;
#(
  parameter logic [31:0] SEED = 32'h0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] key0,
  input  logic [31:0] key1,
  input  logic [31:0] key2,
  output logic        out_valid,
  output logic [31:0] hash
);

  logic        v   [7];
  logic [31:0] amb [7];
  logic [31:0] bb  [7];
  logic [31:0] cc  [7];

  jenkins_init #(.SEED(SEED)) u_init (
    .clk, .rst_n, .in_valid, .key0, .key1, .key2,
    .out_valid(v[0]), .a_minus_b(amb[0]), .b(bb[0]), .c(cc[0])
  );

  for (genvar i = 0; i < 6; i++) begin : g_mix
    jenkins_mix_sub #(
      .SA(MIX_SHIFT[3*(i%3)]), .SB(MIX_SHIFT[3*(i%3)+1]), .SC(MIX_SHIFT[3*(i%3)+2])
    ) u_sub (
      .clk, .rst_n,
      .in_valid(v[i]), .a_minus_b(amb[i]), .b(bb[i]), .c(cc[i]),
      .out_valid(v[i+1]), .a_minus_b_o(amb[i+1]), .b_o(bb[i+1]), .c_o(cc[i+1])
    );
  end

  assign out_valid = v[6];
  assign hash      = cc[6];

endmodule
