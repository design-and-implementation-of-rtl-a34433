// tb_fem_cfg_run: drives one FEM instance of a given size (FS, H, K) with
// random SYN/ACK traffic, one call per cycle, and checks every estimate
// against the software FEM. It also checks the estimate latency and that the
// core never refused a call outside the clear. Used by tb_fem_configs, which
// runs it once per evaluated configuration.
module tb_fem_cfg_run
  import fem_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int FS = 2,
  parameter int H  = 2,
  parameter int K  = 1024,
  parameter int N  = 3000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   accepted,
  output int   run_cycles,
  output logic done
);
  localparam int VW = 16;
  localparam int FSW = (FS > 1) ? $clog2(FS) : 1;
  logic in_valid = 0, in_ready, est_valid, busy;
  fem_op_e op = OP_UPDATE;
  pkt_key_t key = '0;
  flags_t flags = '0;
  logic [FSW-1:0] fs_id = '0, est_fs_id;
  logic signed [VW-1:0] est_value;
  int exp_q[$], cyc_q[$];
  int cyc = 0;
  fem_model m;

  fem #(.FS(FS), .H(H), .K(K), .VW(VW)) dut (
    .clk, .rst_n, .clear(1'b0), .in_valid, .in_ready, .in_op(op), .in_key(key), .in_flags(flags),
    .in_fs_id(fs_id), .est_valid, .est_fs_id, .est_value, .busy);

  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    #1;
    if (rst_n && est_valid) begin
      int e, c0;
      checks += 2;
      e = exp_q.pop_front(); c0 = cyc_q.pop_front();
      if (int'(est_value) != e) begin failures++; $display("FS=%0d H=%0d K=%0d: est %0d expected %0d", FS, H, K, est_value, e); end
      if (cyc - c0 != FEM_LAT) begin failures++; $display("FS=%0d H=%0d K=%0d: latency %0d", FS, H, K, cyc - c0); end
    end
  end

  initial begin
    int t0;
    checks = 0; failures = 0; accepted = 0; run_cycles = 0; done = 0;
    m = new(FS, H, K, VW, DEFAULT_CFG);
    @(posedge rst_n);
    @(posedge clk); #1;
    while (!in_ready) begin @(posedge clk); #1; end
    t0 = cyc;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      in_valid = 1;
      op = ($urandom % 4 == 0) ? OP_ESTIMATE : OP_UPDATE;
      key = '{src_ip: 32'hc0a80000 + ($urandom % 300), dst_ip: 32'h0a000000 + ($urandom % 300),
              src_port: 16'(1024 + $urandom % 4), dst_port: 16'(20 + $urandom % 8)};
      flags = 6'($urandom) & 6'b010010;
      fs_id = FSW'($urandom % FS);
      if (!in_ready) failures++;
      accepted++;
      if (op == OP_UPDATE) m.update(key, flags);
      else begin exp_q.push_back(m.estimate(key, int'(fs_id))); cyc_q.push_back(cyc); end
    end
    @(negedge clk) in_valid = 0;
    run_cycles = cyc - t0;
    repeat (FEM_LAT + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FS=%0d H=%0d K=%0d: missing estimates", FS, H, K); end
    done = 1;
  end
endmodule
