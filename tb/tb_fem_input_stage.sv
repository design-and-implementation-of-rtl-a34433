// tb_fem_input_stage: streams random calls as four words each, with random
// gaps on the word side and random back-pressure on the record side, and
// checks every assembled record field against what was sent, in order. With
// no gaps and no back-pressure one record must come out every four cycles.
module tb_fem_input_stage;
  import fem_pkg::*;
  logic clk = 0, rst_n = 0, word_valid = 0, word_ready, rec_valid, rec_ready = 0;
  logic [31:0] word_data = 0;
  fem_op_e rec_op;
  pkt_key_t rec_key;
  flags_t rec_flags;
  logic [7:0] rec_fs_id;
  typedef struct { pkt_key_t key; fem_op_e op; flags_t flags; logic [7:0] id; } call_t;
  call_t exp_q[$];
  int checks = 0, failures = 0, stalls = 0, recs = 0;
  bit bp_on = 1;

  fem_input_stage dut (.clk, .rst_n, .word_valid, .word_ready, .word_data,
                       .rec_valid, .rec_ready, .rec_op, .rec_key, .rec_flags, .rec_fs_id);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // record side
  always @(negedge clk) rec_ready <= bp_on ? ($urandom % 3 != 0) : 1'b1;
  always @(posedge clk) begin
    if (rst_n && rec_valid && rec_ready) begin
      call_t e;
      checks++; recs++;
      e = exp_q.pop_front();
      if (rec_key !== e.key || rec_op !== e.op || rec_flags !== e.flags || rec_fs_id !== e.id) begin
        failures++; $display("record mismatch");
      end
    end
    if (rst_n && word_valid && !word_ready) stalls++;
  end

  task automatic send_word(logic [31:0] w, bit gaps);
    @(negedge clk);
    while (gaps && ($urandom % 4 == 0)) begin word_valid = 0; @(negedge clk); end
    word_valid = 1; word_data = w;
    @(posedge clk);
    while (!word_ready) @(posedge clk);
  endtask

  task automatic send_call(call_t c, bit gaps);
    exp_q.push_back(c);
    send_word(c.key.src_ip, gaps);
    send_word(c.key.dst_ip, gaps);
    send_word({c.key.src_port, c.key.dst_port}, gaps);
    send_word({c.op, 15'h0, c.id, 2'b0, c.flags}, gaps);
  endtask

  function automatic call_t rand_call();
    call_t c;
    c.key = {$urandom, $urandom, 16'($urandom), 16'($urandom)};
    c.op = fem_op_e'($urandom % 2);
    c.flags = 6'($urandom);
    c.id = 8'($urandom);
    return c;
  endfunction

  // with no gaps and no back-pressure the 100 calls take exactly 400 cycles
  int first_cyc = -1, last_cyc = 0, cyc = 0, fr = 0;
  always @(posedge clk) begin
    cyc++;
    if (!bp_on && rec_valid && rec_ready) begin
      fr++;
      if (first_cyc < 0) first_cyc = cyc;
      last_cyc = cyc;
    end
  end

  initial begin
    int t0, t1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 500; i++) send_call(rand_call(), 1);
    @(negedge clk) word_valid = 0;
    repeat (5) @(posedge clk);
    // full rate
    bp_on = 0;
    repeat (3) @(posedge clk);
    t0 = recs;
    for (int i = 0; i < 100; i++) send_call(rand_call(), 0);
    @(negedge clk) word_valid = 0;
    repeat (5) @(posedge clk);
    t1 = recs;
    checks += 4;
    if (fr != 100 || last_cyc - first_cyc != 4 * 99) begin
      failures++; $display("full rate: %0d records, spacing %0d", fr, last_cyc - first_cyc);
    end
    if (t1 - t0 != 100) begin failures++; $display("%0d records at full rate", t1 - t0); end
    if (stalls == 0) begin failures++; $display("back-pressure never stalled the words"); end
    if (exp_q.size() != 0) begin failures++; $display("records missing"); end
    $display("records %0d, word stalls %0d", recs, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
