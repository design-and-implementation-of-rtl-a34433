// tb_fem_plb_top: end-to-end test of the FEM behind its 32-bit input stage,
// at the default size (4 sketches x 4 hash functions x 1024 counters).
//
// Calls are written as four 32-bit words, as a processor would. The traffic
// mixes completed TCP handshakes (SYN, SYN+ACK back, ACK) from many clients
// with three attacks:
//   - a SYN flood from one source on port 80 of one server,
//   - a port scan: one source sending SYNs to many ports of another host,
//   - a distributed flood: many spoofed sources sending SYNs to a third host.
// Every estimate is compared with a software FEM, and the readings the
// application relies on are checked: the flooded (host, port) stands out in the
// first sketch and the host's count in the second is the sum over its ports, the flood source in the third and fourth,
// the scanner in the third and fourth, the distributed flood only in the
// second. Also checked: estimate latency (18 cycles from the fourth word),
// one call per four cycles at full rate, word stalls while the tables clear,
// and zeroed sketches after a mid-run clear. Each mechanism is counted and
// one that never happened is a failure.
module tb_fem_plb_top;
  import fem_pkg::*;
  import tb_ref_pkg::*;
  localparam int FS = 4, H = 4, K = 1024, VW = 16;
  localparam flags_t SYN = 6'b000010, ACK = 6'b010000, SYNACK = 6'b010010;

  logic clk = 0, rst_n = 0, clear = 0, word_valid = 0, word_ready, est_valid, busy;
  logic [31:0] word_data = 0;
  logic [1:0] est_fs_id;
  logic signed [VW-1:0] est_value;

  fem_plb_top dut (.clk, .rst_n, .clear, .word_valid, .word_ready, .word_data,
                   .est_valid, .est_fs_id, .est_value, .busy);

  always #5 clk = ~clk;

  int cyc = 0, checks = 0, failures = 0;
  int exp_q[$], id_q[$], cyc_q[$], got_q[$];
  fem_model m;
  // mechanism counters
  int n_update = 0, n_estimate = 0, n_syn = 0, n_ack = 0, n_synack = 0;
  int n_stall = 0, n_fwd = 0, n_clear = 0, n_zero_after_clear = 0;

  always @(posedge clk) cyc++;
  always @(posedge clk) if (word_valid && !word_ready) n_stall++;
  always @(posedge clk) if (dut.u_fem.g_fs[0].u_fs.g_row[0].u_table.s1_fwd &&
                            dut.u_fem.g_fs[0].u_fs.g_row[0].u_table.s1_valid) n_fwd++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && est_valid) begin
      int e, id, c0;
      checks += 3;
      e = exp_q.pop_front(); id = id_q.pop_front(); c0 = cyc_q.pop_front();
      got_q.push_back(int'(est_value));
      if (int'(est_value) != e) begin failures++; $display("est %0d expected %0d (FS%0d)", est_value, e, id + 1); end
      if (int'(est_fs_id) != id) begin failures++; $display("fs id %0d expected %0d", est_fs_id, id); end
      if (cyc - c0 != 1 + FEM_LAT) begin failures++; $display("latency %0d", cyc - c0); end
    end
  end

  // one word; returns the cycle count at the negedge before it was taken
  task automatic send_word(logic [31:0] w, output int c_at);
    @(negedge clk);
    word_valid = 1; word_data = w;
    while (!word_ready) @(negedge clk);
    c_at = cyc;
    @(posedge clk);
  endtask

  task automatic call(fem_op_e op, pkt_key_t k, flags_t f, int fs);
    int c;
    send_word(k.src_ip, c);
    send_word(k.dst_ip, c);
    send_word({k.src_port, k.dst_port}, c);
    send_word({op, 15'h0, 8'(fs), 2'b0, f}, c);
    if (op == OP_UPDATE) begin
      m.update(k, f); n_update++;
      if (f == SYN) n_syn++;
      if (f == ACK) n_ack++;
      if (f == SYNACK) n_synack++;
    end else begin
      exp_q.push_back(m.estimate(k, fs)); id_q.push_back(fs); cyc_q.push_back(c);
      n_estimate++;
    end
  endtask

  task automatic idle(int n);
    @(negedge clk) word_valid = 0;
    repeat (n) @(posedge clk);
  endtask

  function automatic pkt_key_t mk(logic [31:0] s, logic [31:0] d, logic [15:0] sp, logic [15:0] dp);
    return '{src_ip: s, dst_ip: d, src_port: sp, dst_port: dp};
  endfunction

  // estimate and wait for the answer
  task automatic ask(pkt_key_t k, int fs, output int v);
    call(OP_ESTIMATE, k, '0, fs);
    idle(FEM_LAT + 3);
    v = got_q.pop_back();
  endtask

  localparam logic [31:0] SERVER = 32'h0a00_0001, SCANNED = 32'h0a00_0002, DDOS_VICTIM = 32'h0a00_0003;
  localparam logic [31:0] FLOODER = 32'hc633_6401, SCANNER = 32'hc633_6402;

  task automatic handshake(logic [31:0] client, logic [31:0] server, logic [15:0] cport, logic [15:0] sport);
    call(OP_UPDATE, mk(client, server, cport, sport), SYN, 0);
    call(OP_UPDATE, mk(server, client, sport, cport), SYNACK, 0);
    call(OP_UPDATE, mk(client, server, cport, sport), ACK, 0);
  endtask

  initial begin
    int v, t0, t1, c;
    m = new(FS, H, K, VW, DEFAULT_CFG);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // the first call is sent while the tables are still being cleared
    @(posedge clk);
    checks++;
    if (!busy) begin failures++; $display("no clear after reset"); end
    handshake(32'hac10_0001, SERVER, 16'd40000, 16'd443);

    // mixed traffic
    for (int i = 0; i < 1500; i++) begin
      int r;
      r = $urandom % 10;
      if (r < 6) handshake(32'hac10_0000 + ($urandom % 200), SERVER, 16'(30000 + $urandom % 1000), 16'(($urandom % 2 != 0) ? 443 : 80));
      else if (r < 8) call(OP_UPDATE, mk(FLOODER, SERVER, 16'($urandom), 16'd80), SYN, 0);
      else if (r < 9) call(OP_UPDATE, mk(SCANNER, SCANNED, 16'd5555, 16'(1 + $urandom % 1024)), SYN, 0);
      else call(OP_UPDATE, mk($urandom, DDOS_VICTIM, 16'($urandom), 16'd80), SYN, 0);
      if ($urandom % 8 == 0) call(OP_ESTIMATE, mk(($urandom % 2 != 0) ? FLOODER : SCANNER,
                                                  ($urandom % 2 != 0) ? SERVER : SCANNED, 16'($urandom), 16'd80), '0, $urandom % 4);
    end
    idle(FEM_LAT + 3);

    // back-to-back updates of one flow (same counters in consecutive calls)
    for (int i = 0; i < 20; i++) call(OP_UPDATE, mk(FLOODER, SERVER, 16'(i), 16'd80), SYN, 0);

    // full rate: 64 calls, one every four cycles
    t0 = cyc;
    for (int i = 0; i < 64; i++) call(OP_UPDATE, mk(32'hac10_0000 + i, SERVER, 16'd1, 16'd443), ACK, 0);
    t1 = cyc;
    checks++;
    if (t1 - t0 != 4 * 64) begin failures++; $display("64 calls took %0d cycles", t1 - t0); end
    idle(FEM_LAT + 3);

    // what the application reads from the four sketches
    begin
      int fs1_victim, fs2_victim, fs3_flooder, fs4_flood, fs3_scanner, fs4_scan, fs2_ddos, fs2_scanned;
      int fs1_https, fs4_ddos_src, fs3_client;
      ask(mk(0, SERVER, 0, 16'd80), 0, fs1_victim);
      ask(mk(0, SERVER, 0, 16'd443), 0, fs1_https);
      ask(mk(0, SERVER, 0, 0), 1, fs2_victim);
      ask(mk(FLOODER, 0, 0, 0), 2, fs3_flooder);
      ask(mk(FLOODER, SERVER, 0, 0), 3, fs4_flood);
      ask(mk(SCANNER, 0, 0, 0), 2, fs3_scanner);
      ask(mk(SCANNER, SCANNED, 0, 0), 3, fs4_scan);
      ask(mk(0, SCANNED, 0, 0), 1, fs2_scanned);
      ask(mk(0, DDOS_VICTIM, 0, 0), 1, fs2_ddos);
      ask(mk(32'h1234_5678, DDOS_VICTIM, 0, 0), 3, fs4_ddos_src);
      ask(mk(32'hac10_0005, 0, 0, 0), 2, fs3_client);
      $display("FS1(server,80)=%0d FS1(server,443)=%0d FS2(server)=%0d FS3(flooder)=%0d FS4(flooder,server)=%0d",
               fs1_victim, fs1_https, fs2_victim, fs3_flooder, fs4_flood);
      $display("FS3(scanner)=%0d FS4(scanner,scanned)=%0d FS2(scanned)=%0d FS2(ddos victim)=%0d FS4(spoofed,ddos)=%0d FS3(client)=%0d",
               fs3_scanner, fs4_scan, fs2_scanned, fs2_ddos, fs4_ddos_src, fs3_client);
      checks += 6;
      if (fs1_victim < 100 || fs1_victim <= 4 * fs1_https) begin failures++; $display("SYN flood port not visible"); end
      if (fs2_victim > fs1_victim + fs1_https + 5 || fs2_victim < fs1_victim + fs1_https - 5) begin
        failures++; $display("FS2(host) is not the sum of its ports in FS1");
      end
      if (fs3_flooder < 100 || fs4_flood < 100) begin failures++; $display("flood source not visible"); end
      if (fs3_scanner < 50 || fs4_scan < 50 || fs2_scanned < 50) begin failures++; $display("scan not visible"); end
      if (fs2_ddos < 50 || fs4_ddos_src > 10) begin failures++; $display("distributed flood reading wrong"); end
      if (fs3_client > 10) begin failures++; $display("completed handshakes left counts"); end
    end

    // new interval: clear, then everything reads zero
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    m.clear();
    n_clear++;
    call(OP_UPDATE, mk(FLOODER, SERVER, 16'd7, 16'd80), SYN, 0);  // taken after the clear
    for (int f = 0; f < FS; f++) begin
      ask(mk(FLOODER, SERVER, 16'd7, 16'd80), f, v);
      checks++;
      if (v != 1) begin failures++; $display("after clear FS%0d = %0d", f + 1, v); end
      else n_zero_after_clear++;
    end
    for (int f = 0; f < FS; f++) begin
      ask(mk(SCANNER, SCANNED, 0, 16'd80), f, v);
      checks++;
      if (v != 0) begin failures++; $display("after clear FS%0d = %0d", f + 1, v); end
    end

    idle(FEM_LAT + 3);
    $display("updates %0d (SYN %0d, ACK %0d, SYN+ACK %0d), estimates %0d, word stalls %0d, forwarded updates %0d, collisions filtered by the minimum %0d, clears %0d",
             n_update, n_syn, n_ack, n_synack, n_estimate, n_stall, n_fwd, m.spread_hits, n_clear);
    checks += 9;
    if (n_update == 0)   begin failures++; $display("no update"); end
    if (n_estimate == 0) begin failures++; $display("no estimate"); end
    if (n_syn == 0)      begin failures++; $display("no SYN"); end
    if (n_ack == 0)      begin failures++; $display("no ACK"); end
    if (n_synack == 0)   begin failures++; $display("no SYN+ACK"); end
    if (n_stall == 0)    begin failures++; $display("no word stall"); end
    if (n_fwd == 0)      begin failures++; $display("no forwarded update"); end
    if (n_clear == 0 || n_zero_after_clear == 0) begin failures++; $display("no clear"); end
    if (exp_q.size() != 0) begin failures++; $display("missing estimates"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
