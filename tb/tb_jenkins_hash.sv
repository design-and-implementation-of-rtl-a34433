// tb_jenkins_hash: checks the 13-stage hash pipeline against the sequential
// Jenkins hash. Random keys are fed every cycle (with gaps); each result must
// appear exactly 13 cycles after its input and equal the reference value.
module tb_jenkins_hash;
  import tb_ref_pkg::*;
  localparam logic [31:0] SEED = 32'hdead_beef;
  localparam int N = 500;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [31:0] k0 = 0, k1 = 0, k2 = 0, hash;
  logic [31:0] exp_q[$];
  int in_cyc_q[$];
  int cyc = 0, checks = 0, failures = 0, got = 0;

  jenkins_hash #(.SEED(SEED)) dut (.clk, .rst_n, .in_valid, .key0(k0), .key1(k1), .key2(k2),
                                   .out_valid, .hash);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      got++;
      checks += 2;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        logic [31:0] e; int c0;
        e = exp_q.pop_front(); c0 = in_cyc_q.pop_front();
        if (hash !== e) begin failures++; $display("hash %h expected %h", hash, e); end
        if (cyc - c0 != 13) begin failures++; $display("latency %0d", cyc - c0); end
      end
    end
  end

  initial begin
    // a fixed vector: all-zero keys, seed 0
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_valid = (i < 50) || ($urandom % 5 != 0);
      k0 = $urandom; k1 = $urandom; k2 = $urandom;
      if (i == 0) begin k0 = 0; k1 = 0; k2 = 0; end
      if (in_valid) begin
        exp_q.push_back(jenkins(k0, k1, k2, SEED));
        in_cyc_q.push_back(cyc);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
