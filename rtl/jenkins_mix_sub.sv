// jenkins_mix_sub: one mix sub-block of the pipelined Jenkins hash.
//
// Computes three consecutive rows of Jenkins' mix function,
//   a = (a - b - c) ^ (c >> SA);  b = (b - c - a) ^ (a << SB);
//   c = (c - a - b) ^ (b >> SC);
// in two pipeline stages of at most three operators each, as in the published design's
// mix sub-block. The "a" input and output carry a - b (the previous stage has
// already subtracted b), so the a row needs only one subtraction:
//   stage 1: a1 = (amb - c) ^ (c >> SA);  bp = b - c - a1;  cp = c - a1
//   stage 2: b1 = bp ^ (a1 << SB);  c1 = (cp - b1) ^ (b1 >> SC);  amb' = a1 - b1
// The sub-blocks differ only in SA, SB, SC.
//
// Timing: two cycles, in_valid -> out_valid. No stall.
module jenkins_mix_sub #(
  parameter int unsigned SA = 13,
  parameter int unsigned SB = 8,
  parameter int unsigned SC = 13
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a_minus_b,
  input  logic [31:0] b,
  input  logic [31:0] c,
  output logic        out_valid,
  output logic [31:0] a_minus_b_o,
  output logic [31:0] b_o,
  output logic [31:0] c_o
);

  logic        v1;
  logic [31:0] a1_q, bp_q, cp_q;
  logic [31:0] a1_d, b1_d;

  // stage 1
  assign a1_d = (a_minus_b - c) ^ (c >> SA);

  always_ff @(posedge clk) begin
    a1_q <= a1_d;
    bp_q <= (b - c) - a1_d;
    cp_q <= c - a1_d;
  end

  // stage 2
  assign b1_d = bp_q ^ (a1_q << SB);

  always_ff @(posedge clk) begin
    b_o         <= b1_d;
    c_o         <= (cp_q - b1_d) ^ (b1_d >> SC);
    a_minus_b_o <= a1_q - b1_d;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

endmodule
