// tb_feature_sketch: one feature sketch (configuration FS1: dst IP + dst
// port, SYN - ACK) with 2 rows of 64 counters. Random updates and estimates
// over a small set of flows, one call per cycle; every estimate is compared
// with the software sketch and must arrive 16 cycles after its call. Source
// fields, which FS1 ignores, are randomised to check they do not matter.
module tb_feature_sketch;
  import fem_pkg::*;
  import tb_ref_pkg::*;
  localparam int H = 2, K = 64, VW = 16;
  localparam fs_cfg_t [MAX_FS-1:0] CF = DEFAULT_CFG;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, est_valid, busy;
  fem_op_e op = OP_UPDATE;
  pkt_key_t key = '0;
  flags_t flags = '0;
  logic signed [VW-1:0] est_value;
  int exp_q[$], cyc_q[$];
  int cyc = 0, checks = 0, failures = 0;
  fem_model m;

  feature_sketch #(.FS_IDX(0), .H(H), .K(K), .VW(VW), .CFG(CF[0])) dut (
    .clk, .rst_n, .clear, .in_valid, .in_op(op), .in_key(key), .in_flags(flags),
    .est_valid, .est_value, .busy);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && est_valid) begin
      int e, c0;
      checks += 2;
      e = exp_q.pop_front(); c0 = cyc_q.pop_front();
      if (int'(est_value) != e) begin failures++; $display("est %0d expected %0d", est_value, e); end
      if (cyc - c0 != FS_LAT) begin failures++; $display("latency %0d", cyc - c0); end
    end
  end

  initial begin
    m = new(1, H, K, VW, CF);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    while (busy) begin @(posedge clk); #1; end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 6) != 0;
      op = ($urandom % 3 == 0) ? OP_ESTIMATE : OP_UPDATE;
      key = '{src_ip: $urandom, dst_ip: 32'h0a000000 + ($urandom % 6),
              src_port: 16'($urandom), dst_port: 16'(80 + $urandom % 3)};
      flags = 6'($urandom) & 6'b010010;
      if (in_valid) begin
        if (op == OP_UPDATE) m.update(key, flags);
        else begin exp_q.push_back(m.estimate(key, 0)); cyc_q.push_back(cyc); end
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (FS_LAT + 3) @(posedge clk);
    checks += 2;
    if (exp_q.size() != 0) begin failures++; $display("missing estimates"); end
    if (m.spread_hits == 0) begin failures++; $display("no collision ever filtered by the minimum"); end
    $display("estimates where rows disagreed: %0d", m.spread_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
