// fem_pkg: types and constants shared by the feature extraction module (FEM).
//
// A packet record carries the four key fields (source/destination IPv4
// address and TCP port) and the six TCP flag bits, the widths of the FEM's
// inputs. The Jenkins hash constants and the mix-row shift amounts are those
// of Bob Jenkins' 32-bit hash. The per-sketch configuration selects which key
// fields a sketch hashes and which flags increment or decrement its counters;
// the default set is the four-sketch SYN/ACK application (dst IP + dst port,
// dst IP, src IP, src IP + dst IP). The flag bit order follows the TCP header,
// the golden ratio is Jenkins' 0x9e3779b9, and the seeds, the op encoding and
// the counter width are this design's own choices.
package fem_pkg;

  // ---- packet header fields -------------------------------------------
  localparam int unsigned IP_W   = 32;
  localparam int unsigned PORT_W = 16;
  localparam int unsigned FLAG_W = 6;

  // TCP flag bits in header order: URG ACK PSH RST SYN FIN (bit 5 .. bit 0)
  localparam int unsigned FLAG_FIN = 0;
  localparam int unsigned FLAG_SYN = 1;
  localparam int unsigned FLAG_RST = 2;
  localparam int unsigned FLAG_PSH = 3;
  localparam int unsigned FLAG_ACK = 4;
  localparam int unsigned FLAG_URG = 5;

  typedef logic [FLAG_W-1:0] flags_t;

  typedef struct packed {
    logic [IP_W-1:0]   src_ip;
    logic [IP_W-1:0]   dst_ip;
    logic [PORT_W-1:0] src_port;
    logic [PORT_W-1:0] dst_port;
  } pkt_key_t;

  // The two calls the FEM supports.
  typedef enum logic {
    OP_UPDATE   = 1'b0,
    OP_ESTIMATE = 1'b1
  } fem_op_e;

  // ---- per feature sketch configuration --------------------------------
  // key_sel bits: [0] src_ip, [1] dst_ip, [2] src_port, [3] dst_port.
  localparam int unsigned SEL_SRC_IP   = 0;
  localparam int unsigned SEL_DST_IP   = 1;
  localparam int unsigned SEL_SRC_PORT = 2;
  localparam int unsigned SEL_DST_PORT = 3;

  typedef struct packed {
    logic [3:0] key_sel;   // fields hashed; the others are replaced by zero
    flags_t     inc_mask;  // a set flag among these adds one
    flags_t     dec_mask;  // a set flag among these subtracts one
  } fs_cfg_t;

  localparam int unsigned MAX_FS = 16;  // configuration slots in CFG parameters

  localparam flags_t SYN_M = flags_t'(1) << FLAG_SYN;
  localparam flags_t ACK_M = flags_t'(1) << FLAG_ACK;

  localparam fs_cfg_t FS1_CFG = '{key_sel: 4'b1010, inc_mask: SYN_M, dec_mask: ACK_M}; // (dst IP, dst port)
  localparam fs_cfg_t FS2_CFG = '{key_sel: 4'b0010, inc_mask: SYN_M, dec_mask: ACK_M}; // (dst IP)
  localparam fs_cfg_t FS3_CFG = '{key_sel: 4'b0001, inc_mask: SYN_M, dec_mask: ACK_M}; // (src IP)
  localparam fs_cfg_t FS4_CFG = '{key_sel: 4'b0011, inc_mask: SYN_M, dec_mask: ACK_M}; // (src IP, dst IP)

  // Slot i holds the configuration of sketch i; the four application
  // sketches repeat for larger FS.
  localparam fs_cfg_t [MAX_FS-1:0] DEFAULT_CFG = {
    FS4_CFG, FS3_CFG, FS2_CFG, FS1_CFG, FS4_CFG, FS3_CFG, FS2_CFG, FS1_CFG,
    FS4_CFG, FS3_CFG, FS2_CFG, FS1_CFG, FS4_CFG, FS3_CFG, FS2_CFG, FS1_CFG};

  // ---- Jenkins hash -----------------------------------------------------
  localparam logic [31:0] GOLDEN_RATIO = 32'h9e37_79b9;

  // Seed of hash function h of feature sketch fs: distinct odd multiples of
  // a 32-bit constant, so every hash function in the FEM differs.
  function automatic logic [31:0] seed_of(int unsigned fs, int unsigned h);
    logic [31:0] idx;
    idx = 32'(fs * 64 + h + 1);
    return idx * 32'h85eb_ca6b;
  endfunction

  // Shift amounts of the nine mix rows: rows 3j, 3j+1, 3j+2 belong to mix
  // sub-block j (a row uses >>, b row <<, c row >>).
  localparam int unsigned MIX_SHIFT [9] = '{13, 8, 13, 12, 16, 5, 3, 10, 15};

  // ---- pipeline latencies (cycles from input to registered output) ------
  localparam int unsigned HASH_LAT  = 13;  // 1 init stage + 6 sub-blocks x 2
  localparam int unsigned TABLE_LAT = 2;   // registered read, then registered result
  localparam int unsigned EST_LAT   = 1;   // minimum register
  localparam int unsigned FS_LAT    = HASH_LAT + TABLE_LAT + EST_LAT;
  localparam int unsigned OUT_LAT   = 1;   // output control register
  localparam int unsigned FEM_LAT   = FS_LAT + OUT_LAT;

endpackage
