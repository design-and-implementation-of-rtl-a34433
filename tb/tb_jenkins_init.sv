// tb_jenkins_init: checks the hash initialization stage.
// Random keys every cycle; one cycle later a = K0 - K1, b = K1 + 0x9e3779b9,
// c = K2 + SEED, and out_valid follows in_valid by exactly one cycle.
module tb_jenkins_init;
  localparam logic [31:0] SEED = 32'h1234_5677;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [31:0] k0, k1, k2, amb, b, c;
  logic [31:0] e_amb, e_b, e_c;
  logic        e_v;
  int checks = 0, failures = 0;

  jenkins_init #(.SEED(SEED)) dut (.clk, .rst_n, .in_valid, .key0(k0), .key1(k1), .key2(k2),
                                   .out_valid, .a_minus_b(amb), .b, .c);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    k0 = 0; k1 = 0; k2 = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      k0 = $urandom; k1 = $urandom; k2 = $urandom; in_valid = ($urandom % 4) != 0;
      e_amb = k0 - k1; e_b = k1 + 32'h9e3779b9; e_c = k2 + SEED; e_v = in_valid;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== e_v || amb !== e_amb || b !== e_b || c !== e_c) begin
        failures++;
        $display("mismatch %0d: %h %h %h v%0d", i, amb, b, c, out_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
