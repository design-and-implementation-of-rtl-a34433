// hash_control: input multiplexer and value function of one feature sketch.
//
// Builds the three 32-bit hash keys from the packet header, keeping only the
// fields this sketch's configuration selects and replacing the others with
// zero: K0 = source IP, K1 = destination IP, K2 = {source port, destination
// port}. It also turns the TCP flags into the value added to the sketch
// counters: +1 if a flag of inc_mask is set (SYN in the default
// configuration), -1 if a flag of dec_mask is set (ACK), their sum if both.
// Field zeroing and the SYN/ACK rule follow the published design; the assignment of
// fields to K0..K2 and the mask form of the value function are this design's
// choice. Purely combinational.
module hash_control
  import fem_pkg::*;
#(
  parameter fs_cfg_t CFG = FS1_CFG
) (
  input  pkt_key_t          key,
  input  flags_t            flags,
  output logic [31:0]       key0,
  output logic [31:0]       key1,
  output logic [31:0]       key2,
  output logic signed [1:0] delta
);

  logic inc, dec;

  always_comb begin
    key0 = CFG.key_sel[SEL_SRC_IP] ? key.src_ip : '0;
    key1 = CFG.key_sel[SEL_DST_IP] ? key.dst_ip : '0;
    key2 = {CFG.key_sel[SEL_SRC_PORT] ? key.src_port : PORT_W'(0),
            CFG.key_sel[SEL_DST_PORT] ? key.dst_port : PORT_W'(0)};
    inc   = |(flags & CFG.inc_mask);
    dec   = |(flags & CFG.dec_mask);
    delta = $signed({1'b0, inc}) - $signed({1'b0, dec});
  end

endmodule
