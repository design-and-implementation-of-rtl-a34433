// tb_sketch_table: drives one request per cycle with random ops, addresses
// in a small range (so back-to-back updates of one entry are frequent) and
// values -1/0/+1, and compares every estimate with a software table. A second
// table with 4-bit counters is driven to both saturation limits. Also checks
// the K-cycle clear after reset and after a clear pulse, and the 2-cycle
// estimate latency. Counts how often the forwarding path was needed.
module tb_sketch_table;
  import fem_pkg::*;
  import tb_ref_pkg::*;
  localparam int K = 16, VW = 16, AW = 4;
  logic clk = 0, rst_n = 0, clear = 0;
  logic req_valid = 0;
  fem_op_e req_op = OP_UPDATE;
  logic [AW-1:0] addr = 0;
  logic signed [1:0] delta = 0;
  logic est_valid, busy, est_valid4, busy4;
  logic signed [VW-1:0] est_value;
  logic signed [3:0] est_value4;
  int model [K], model4 [K];
  int exp_q[$], exp4_q[$], cyc_q[$];
  int cyc = 0, checks = 0, failures = 0, fwd_hits = 0, sat_hits = 0;

  sketch_table #(.K(K), .VW(VW)) dut (.clk, .rst_n, .clear, .req_valid, .req_op, .req_addr(addr),
                                      .req_delta(delta), .est_valid, .est_value, .busy);
  sketch_table #(.K(K), .VW(4)) dut4 (.clk, .rst_n, .clear, .req_valid, .req_op, .req_addr(addr),
                                      .req_delta(delta), .est_valid(est_valid4), .est_value(est_value4),
                                      .busy(busy4));
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (dut.s1_fwd && dut.s1_valid) fwd_hits++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && est_valid) begin
      int e, e4, c0;
      checks += 3;
      e = exp_q.pop_front(); e4 = exp4_q.pop_front(); c0 = cyc_q.pop_front();
      if (int'(est_value) != e)   begin failures++; $display("est %0d expected %0d", est_value, e); end
      if (int'(est_value4) != e4 || !est_valid4) begin failures++; $display("est4 %0d expected %0d", est_value4, e4); end
      if (cyc - c0 != 2) begin failures++; $display("latency %0d", cyc - c0); end
    end
  end

  task automatic wait_clear();
    int n = 0;
    @(posedge clk); #1;
    while (busy) begin @(posedge clk); #1; n++; end
    checks++;
    if (n != K - 1 && n != K) begin failures++; $display("clear took %0d cycles", n); end
    foreach (model[i]) begin model[i] = 0; model4[i] = 0; end
  endtask

  task automatic run(int n, int addr_range, bit bias_up, bit bias_down);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      req_valid = ($urandom % 8) != 0;
      req_op = (($urandom % 4) == 0) ? OP_ESTIMATE : OP_UPDATE;
      addr = AW'($urandom % addr_range);
      delta = 2'($signed($urandom % 3) - 1);
      if (bias_up) delta = 1;
      if (bias_down) delta = -1;
      if (req_valid) begin
        if (req_op == OP_ESTIMATE) begin
          exp_q.push_back(model[addr]); exp4_q.push_back(model4[addr]); cyc_q.push_back(cyc);
        end else begin
          int s;
          s = sat_add(model4[addr], int'(delta), 4);
          if (s != model4[addr] + int'(delta)) sat_hits++;
          model[addr] = sat_add(model[addr], int'(delta), VW);
          model4[addr] = s;
        end
      end
    end
    @(negedge clk) req_valid = 0;
    repeat (4) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    wait_clear();
    run(3000, 3, 0, 0);
    run(400, K, 1, 0);     // drive 4-bit counters to +7
    run(800, K, 0, 1);     // and to -8
    run(1000, K, 0, 0);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    wait_clear();
    run(500, 2, 0, 0);
    checks += 2;
    if (fwd_hits == 0) begin failures++; $display("forwarding never used"); end
    if (sat_hits == 0) begin failures++; $display("saturation never reached"); end
    if (exp_q.size() != 0) begin failures++; $display("missing estimates"); end
    $display("forwarding %0d, saturation %0d", fwd_hits, sat_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
