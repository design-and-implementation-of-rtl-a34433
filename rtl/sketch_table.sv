// sketch_table: one sketch table, K signed counters of VW bits.
//
// A request carries an address (the low bits of a hash value), an op and a
// value. The table is read with a registered read (block RAM style); one cycle
// later an update writes back the saturated sum of the stored counter and the
// value, and an estimate returns the stored counter on the next cycle. When an
// update hits the entry written in the same cycle by the previous request, the
// freshly written value is forwarded instead of the stale read, so
// back-to-back updates of one entry count correctly at one request per cycle.
// Reset, or a pulse on clear, zeroes the table by sweeping one entry per cycle
// (busy high for K cycles); a request that reaches the write stage during the
// sweep is dropped (an estimate answers 0).
// The published design gives the table's role (a hash-addressed lookup table in block
// RAM updated from the flags); the counter width, saturation, forwarding and
// the clear sweep are this design's choices.
//
// Timing: request at cycle t, write-back at t+1, est_valid/est_value at t+2
// (TABLE_LAT). One request per cycle, no stall.
module sketch_table
  import fem_pkg::*;
#(
  parameter int unsigned K  = 1024,
  parameter int unsigned VW = 16,
  localparam int unsigned AW = (K > 1) ? $clog2(K) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 req_valid,
  input  fem_op_e              req_op,
  input  logic [AW-1:0]        req_addr,
  input  logic signed [1:0]    req_delta,
  output logic                 est_valid,
  output logic signed [VW-1:0] est_value,
  output logic                 busy
);

  localparam logic signed [VW-1:0] VMAX = {1'b0, {(VW-1){1'b1}}};
  localparam logic signed [VW-1:0] VMIN = {1'b1, {(VW-1){1'b0}}};

  logic signed [VW-1:0] mem [K];

  // clear sweep
  logic          clearing;
  logic [AW-1:0] clr_addr;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      clearing <= 1'b1;
      clr_addr <= '0;
    end else if (clearing) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == AW'(K - 1)) clearing <= 1'b0;
    end
  end
  assign busy = clearing;

  // stage 1 registers
  logic                 s1_valid, s1_clr, s1_fwd;
  fem_op_e              s1_op;
  logic [AW-1:0]        s1_addr;
  logic signed [1:0]    s1_delta;
  logic signed [VW-1:0] rd_q, fwd_q;
  logic signed [VW-1:0] cur, nxt;
  logic                 wr_en;

  always_comb begin
    cur   = s1_clr ? '0 : (s1_fwd ? fwd_q : rd_q);
    nxt   = cur + VW'(s1_delta);
    if (s1_delta > 0 && cur == VMAX) nxt = VMAX;   // saturate
    if (s1_delta < 0 && cur == VMIN) nxt = VMIN;
    wr_en = s1_valid && (s1_op == OP_UPDATE) && !clearing;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= req_valid;
    s1_op    <= req_op;
    s1_addr  <= req_addr;
    s1_delta <= req_delta;
    s1_clr   <= clearing;
    s1_fwd   <= wr_en && (req_addr == s1_addr);
    fwd_q    <= nxt;
    rd_q     <= mem[req_addr];
  end

  always_ff @(posedge clk) begin
    if (clearing)   mem[clr_addr] <= '0;
    else if (wr_en) mem[s1_addr]  <= nxt;
  end

  // stage 2: estimate result
  always_ff @(posedge clk) begin
    if (!rst_n) est_valid <= 1'b0;
    else        est_valid <= s1_valid && (s1_op == OP_ESTIMATE);
    est_value <= clearing ? '0 : cur;
  end

endmodule
