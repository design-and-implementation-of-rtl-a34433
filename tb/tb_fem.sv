// tb_fem: the FEM core with four sketches (the default configurations), two
// rows and 256-entry tables. One call per cycle, random updates and estimates
// over a small flow set, every estimate checked against the software FEM, with
// its sketch id, 17 cycles after the call. A clear pulse in mid-run must hold
// in_ready low for K cycles and zero every counter.
module tb_fem;
  import fem_pkg::*;
  import tb_ref_pkg::*;
  localparam int FS = 4, H = 2, K = 64, VW = 16;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_ready, est_valid, busy;
  fem_op_e op = OP_UPDATE;
  pkt_key_t key = '0;
  flags_t flags = '0;
  logic [1:0] fs_id = 0, est_fs_id;
  logic signed [VW-1:0] est_value;
  int exp_q[$], id_q[$], cyc_q[$];
  int cyc = 0, checks = 0, failures = 0, n_est = 0;
  fem_model m;

  fem #(.FS(FS), .H(H), .K(K), .VW(VW)) dut (
    .clk, .rst_n, .clear, .in_valid, .in_ready, .in_op(op), .in_key(key), .in_flags(flags),
    .in_fs_id(fs_id), .est_valid, .est_fs_id, .est_value, .busy);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && est_valid) begin
      int e, id, c0;
      checks += 3; n_est++;
      e = exp_q.pop_front(); id = id_q.pop_front(); c0 = cyc_q.pop_front();
      if (int'(est_value) != e) begin failures++; $display("est %0d expected %0d (fs %0d)", est_value, e, id); end
      if (int'(est_fs_id) != id) begin failures++; $display("fs id %0d expected %0d", est_fs_id, id); end
      if (cyc - c0 != FEM_LAT) begin failures++; $display("latency %0d", cyc - c0); end
    end
  end

  task automatic wait_ready(int expect_cycles);
    int n = 0;
    @(posedge clk); #1;
    while (!in_ready) begin @(posedge clk); #1; n++; end
    checks++;
    if (n < expect_cycles - 2 || n > expect_cycles) begin failures++; $display("not ready for %0d cycles", n); end
  endtask

  task automatic traffic(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      op = ($urandom % 3 == 0) ? OP_ESTIMATE : OP_UPDATE;
      key = '{src_ip: 32'hc0a80000 + ($urandom % 24), dst_ip: 32'h0a000000 + ($urandom % 24),
              src_port: 16'(1024 + $urandom % 2), dst_port: 16'(20 + $urandom % 3)};
      flags = 6'($urandom) & 6'b010010;
      fs_id = 2'($urandom);
      if (in_valid && in_ready) begin
        if (op == OP_UPDATE) m.update(key, flags);
        else begin exp_q.push_back(m.estimate(key, int'(fs_id))); id_q.push_back(int'(fs_id)); cyc_q.push_back(cyc); end
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (FEM_LAT + 2) @(posedge clk);
  endtask

  initial begin
    m = new(FS, H, K, VW, DEFAULT_CFG);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    wait_ready(K);
    traffic(4000);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    m.clear();
    wait_ready(K);
    traffic(1500);
    checks += 2;
    if (exp_q.size() != 0) begin failures++; $display("missing estimates"); end
    if (m.spread_hits == 0) begin failures++; $display("minimum never filtered a collision"); end
    $display("estimates %0d, filtered collisions %0d", n_est, m.spread_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
