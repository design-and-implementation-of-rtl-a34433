// tb_estimate_block: the registered output must be the minimum of the H
// signed inputs one cycle after in_valid.
module tb_estimate_block;
  localparam int H = 4, VW = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [VW-1:0] v [H];
  logic signed [VW-1:0] out_value;
  int checks = 0, failures = 0;

  estimate_block #(.H(H), .VW(VW)) dut (.clk, .rst_n, .in_valid, .in_value(v), .out_valid, .out_value);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m;
    foreach (v[i]) v[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      m = 1 << 20;
      foreach (v[i]) begin
        v[i] = (n % 3 == 0) ? VW'($signed($urandom % 16) - 8) : VW'($urandom);
        if (int'(v[i]) < m) m = int'(v[i]);
      end
      in_valid = n % 7 != 3;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid || (in_valid && int'(out_value) != m)) begin
        failures++;
        $display("min %0d expected %0d", out_value, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
