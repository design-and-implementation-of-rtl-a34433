// estimate_block: estimate of one feature sketch.
//
// Takes the H counters read from the sketch tables of a feature sketch for one
// key and outputs their minimum, the estimate least affected by hash
// collisions (as the published design specifies). A combinational minimum tree feeds one
// output register.
//
// Timing: in_valid at t, out_valid/out_value at t+1 (EST_LAT).
module estimate_block #(
  parameter int unsigned H  = 4,
  parameter int unsigned VW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [VW-1:0] in_value [H],
  output logic                 out_valid,
  output logic signed [VW-1:0] out_value
);

  logic signed [VW-1:0] m;

  always_comb begin
    m = in_value[0];
    for (int i = 1; i < H; i++)
      if (in_value[i] < m) m = in_value[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    out_value <= m;
  end

endmodule
