// tb_output_control: the value of the sketch named by in_fs_id, with the id,
// must appear one cycle after in_valid.
module tb_output_control;
  localparam int FS = 4, VW = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [1:0] id = 0, out_id;
  logic signed [VW-1:0] v [FS];
  logic signed [VW-1:0] out_value;
  int checks = 0, failures = 0;

  output_control #(.FS(FS), .VW(VW)) dut (.clk, .rst_n, .in_valid, .in_fs_id(id), .in_value(v),
                                          .out_valid, .out_fs_id(out_id), .out_value);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [VW-1:0] e;
    foreach (v[i]) v[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      foreach (v[i]) v[i] = VW'($urandom);
      id = 2'($urandom);
      e = v[id];
      in_valid = n % 5 != 0;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid || (in_valid && (out_value !== e || out_id !== id))) begin
        failures++;
        $display("got %0d id %0d expected %0d id %0d", out_value, out_id, e, id);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
