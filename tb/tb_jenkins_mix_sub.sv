// tb_jenkins_mix_sub: checks one mix sub-block against three mix rows.
// For random (a, b, c) the block gets (a - b, b, c) and must return, two
// cycles later, (a' - b', b', c') where a', b', c' are the three rows
// computed sequentially. The sub-block with shifts (12, 16, 5) is tested as
// well as the default (13, 8, 13).
module tb_jenkins_mix_sub;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [31:0] a, b, c;
  logic        v1, v2;
  logic [31:0] amb1, b1, c1, amb2, b2, c2;
  int checks = 0, failures = 0;

  jenkins_mix_sub #(.SA(13), .SB(8), .SC(13)) d1 (.clk, .rst_n, .in_valid, .a_minus_b(a - b), .b, .c,
                                                  .out_valid(v1), .a_minus_b_o(amb1), .b_o(b1), .c_o(c1));
  jenkins_mix_sub #(.SA(12), .SB(16), .SC(5)) d2 (.clk, .rst_n, .in_valid, .a_minus_b(a - b), .b, .c,
                                                  .out_valid(v2), .a_minus_b_o(amb2), .b_o(b2), .c_o(c2));
  always #5 clk = ~clk;

  function automatic void rows(input logic [31:0] x, y, z, input int sa, sb, sc,
                               output logic [31:0] xo, yo, zo);
    x = (x - y - z) ^ (z >> sa);
    y = (y - z - x) ^ (x << sb);
    z = (z - x - y) ^ (y >> sc);
    xo = x; yo = y; zo = z;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ea, eb, ec, fa, fb, fc;
    a = 0; b = 0; c = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      a = $urandom; b = $urandom; c = $urandom; in_valid = 1;
      rows(a, b, c, 13, 8, 13, ea, eb, ec);
      rows(a, b, c, 12, 16, 5, fa, fb, fc);
      @(negedge clk); in_valid = 0;
      checks++;
      if (v1) begin failures++; $display("valid one cycle early"); end
      @(posedge clk); #1;
      checks += 2;
      if (!v1 || amb1 !== ea - eb || b1 !== eb || c1 !== ec) begin
        failures++; $display("sub(13,8,13) mismatch %0d", i);
      end
      if (!v2 || amb2 !== fa - fb || b2 !== fb || c2 !== fc) begin
        failures++; $display("sub(12,16,5) mismatch %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
