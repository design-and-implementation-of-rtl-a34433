// output_control: selects the estimate of one feature sketch.
//
// All feature sketches answer an estimate call at the same cycle; this block
// passes on the value of the sketch named by the call's FS_ID (the published design's
// output control block) and registers it together with the id.
//
// Timing: in at t, out at t+1 (OUT_LAT).
module output_control #(
  parameter int unsigned FS  = 4,
  parameter int unsigned VW  = 16,
  localparam int unsigned FSW = (FS > 1) ? $clog2(FS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [FSW-1:0]       in_fs_id,
  input  logic signed [VW-1:0] in_value [FS],
  output logic                 out_valid,
  output logic [FSW-1:0]       out_fs_id,
  output logic signed [VW-1:0] out_value
);

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    out_fs_id <= in_fs_id;
    out_value <= (32'(in_fs_id) < FS) ? in_value[in_fs_id] : '0;  // unknown id reads 0
  end

endmodule
