// fem: Feature Extraction Module core.
//
// FS feature sketches run side by side on the same packet record; sketch i
// uses configuration slot i of CFG (which key fields it hashes, which flags
// raise or lower its counters). One call per cycle is accepted:
//   update   (key, flags)  : every sketch adds its flag value to its tables;
//   estimate (key, fs_id)  : every sketch reads its tables, and the output
//                            control block returns the minimum counter of
//                            sketch fs_id.
// The record is the 128-bit-per-cycle input of the published design's FEM (src IP, dst IP,
// src port, dst port, 6 flags). The default configuration is the four-sketch
// SYN/ACK application with four hash functions per sketch and 1024-entry
// tables. The valid/ready handshake, the clear input and the counter width are
// this design's choices.
//
// Timing: in_ready is low only while the tables are cleared (K cycles after
// reset or clear). An estimate answered FEM_LAT = 17 cycles after it was
// accepted; updates give no response. Calls complete in order, and an estimate
// sees every update accepted before it.
module fem
  import fem_pkg::*;
#(
  parameter int unsigned              FS  = 4,
  parameter int unsigned              H   = 4,
  parameter int unsigned              K   = 1024,
  parameter int unsigned              VW  = 16,
  parameter fs_cfg_t [MAX_FS-1:0]     CFG = DEFAULT_CFG,
  localparam int unsigned             FSW = (FS > 1) ? $clog2(FS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  fem_op_e              in_op,
  input  pkt_key_t             in_key,
  input  flags_t               in_flags,
  input  logic [FSW-1:0]       in_fs_id,
  output logic                 est_valid,
  output logic [FSW-1:0]       est_fs_id,
  output logic signed [VW-1:0] est_value,
  output logic                 busy
);

  logic                 fs_valid [FS];
  logic signed [VW-1:0] fs_value [FS];
  logic                 fs_busy  [FS];
  logic                 accept;

  assign in_ready = !fs_busy[0];
  assign busy     = fs_busy[0];
  assign accept   = in_valid && in_ready;

  for (genvar f = 0; f < FS; f++) begin : g_fs
    feature_sketch #(.FS_IDX(f), .H(H), .K(K), .VW(VW), .CFG(CFG[f])) u_fs (
      .clk, .rst_n, .clear,
      .in_valid(accept), .in_op, .in_key, .in_flags,
      .est_valid(fs_valid[f]), .est_value(fs_value[f]), .busy(fs_busy[f])
    );
  end

  // FS_ID follows the call through the sketches
  logic [FSW-1:0] id_d [FS_LAT];

  always_ff @(posedge clk) begin
    id_d[0] <= in_fs_id;
    for (int i = 1; i < FS_LAT; i++) id_d[i] <= id_d[i-1];
  end

  output_control #(.FS(FS), .VW(VW)) u_out (
    .clk, .rst_n,
    .in_valid(fs_valid[0]), .in_fs_id(id_d[FS_LAT-1]), .in_value(fs_value),
    .out_valid(est_valid), .out_fs_id(est_fs_id), .out_value(est_value)
  );

  if (FS < 1 || FS > MAX_FS) begin : g_bad_fs
    $error("FS must be between 1 and MAX_FS");
  end

endmodule
