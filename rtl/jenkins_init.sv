// jenkins_init: initialization stage of the pipelined Jenkins hash.
//
// Jenkins' hash starts from A = B = golden ratio, C = seed and adds the three
// keys, A += K0, B += K1, C += K2. The first row of the mix function then needs
// A - B - C. This stage computes A - B already (the golden ratio cancels, so it
// is K0 - K1), B = K1 + golden ratio and C = K2 + seed, and registers them: the
// "a" output therefore carries a - b, the form every mix sub-block expects.
// Structure after the published design's initialization stage (three operators, one
// pipeline register); the seed is a parameter.
//
// Timing: one cycle, in_valid -> out_valid. No stall.
module jenkins_init
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
  output logic [31:0] a_minus_b,  // A - B
  output logic [31:0] b,
  output logic [31:0] c
);

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    a_minus_b <= key0 - key1;
    b         <= key1 + GOLDEN_RATIO;
    c         <= key2 + SEED;
  end

endmodule
