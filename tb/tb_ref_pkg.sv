// tb_ref_pkg: reference models used by the testbenches.
//
// Bob Jenkins' 32-bit hash written straight from its definition (A = B =
// golden ratio, C = seed, add the keys, mix twice, result C), the hash-control
// key selection and the SYN/ACK value rule, and a saturating counter add.
// These are plain sequential functions, independent of the pipelined RTL.
package tb_ref_pkg;
  import fem_pkg::*;

  function automatic void mix(ref logic [31:0] a, ref logic [31:0] b, ref logic [31:0] c);
    a = (a - b - c) ^ (c >> 13);
    b = (b - c - a) ^ (a << 8);
    c = (c - a - b) ^ (b >> 13);
    a = (a - b - c) ^ (c >> 12);
    b = (b - c - a) ^ (a << 16);
    c = (c - a - b) ^ (b >> 5);
    a = (a - b - c) ^ (c >> 3);
    b = (b - c - a) ^ (a << 10);
    c = (c - a - b) ^ (b >> 15);
  endfunction

  function automatic logic [31:0] jenkins(logic [31:0] k0, logic [31:0] k1,
                                          logic [31:0] k2, logic [31:0] seed);
    logic [31:0] a, b, c;
    a = 32'h9e3779b9 + k0;
    b = 32'h9e3779b9 + k1;
    c = seed + k2;
    mix(a, b, c);
    mix(a, b, c);
    return c;
  endfunction

  // hash of one row of a sketch for a packet, per the sketch configuration
  function automatic logic [31:0] row_hash(fs_cfg_t cfg, pkt_key_t k, logic [31:0] seed);
    logic [31:0] k0, k1, k2;
    k0 = cfg.key_sel[0] ? k.src_ip : 32'h0;
    k1 = cfg.key_sel[1] ? k.dst_ip : 32'h0;
    k2 = {cfg.key_sel[2] ? k.src_port : 16'h0, cfg.key_sel[3] ? k.dst_port : 16'h0};
    return jenkins(k0, k1, k2, seed);
  endfunction

  function automatic int flag_delta(fs_cfg_t cfg, flags_t f);
    return ((f & cfg.inc_mask) != 0 ? 1 : 0) - ((f & cfg.dec_mask) != 0 ? 1 : 0);
  endfunction

  function automatic int sat_add(int v, int d, int vw);
    int hi = (1 << (vw - 1)) - 1;
    int lo = -(1 << (vw - 1));
    int r = v + d;
    if (r > hi) r = hi;
    if (r < lo) r = lo;
    return r;
  endfunction

  // Software FEM: FS sketches of H rows of K counters, same seeds and
  // configurations as the hardware is built with.
  class fem_model;
    int fs_n, h_n, k_n, vw;
    fs_cfg_t cfg [];
    int tbl [][][];
    int spread_hits;   // estimates whose rows disagreed (a collision was filtered)

    function new(int fs, int h, int k, int v, fs_cfg_t [MAX_FS-1:0] c);
      fs_n = fs; h_n = h; k_n = k; vw = v;
      cfg = new[fs];
      tbl = new[fs];
      for (int f = 0; f < fs; f++) begin
        cfg[f] = c[f];
        tbl[f] = new[h];
        for (int r = 0; r < h; r++) tbl[f][r] = new[k];
      end
      clear();
    endfunction

    function void clear();
      foreach (tbl[f, r, i]) tbl[f][r][i] = 0;
    endfunction

    function int addr(int f, int r, pkt_key_t key);
      return int'(row_hash(cfg[f], key, seed_of(f, r)) % k_n);
    endfunction

    function void update(pkt_key_t key, flags_t flags);
      for (int f = 0; f < fs_n; f++)
        for (int r = 0; r < h_n; r++) begin
          int a = addr(f, r, key);
          tbl[f][r][a] = sat_add(tbl[f][r][a], flag_delta(cfg[f], flags), vw);
        end
    endfunction

    function int estimate(pkt_key_t key, int f);
      int m, mx;
      m = tbl[f][0][addr(f, 0, key)];
      mx = m;
      for (int r = 1; r < h_n; r++) begin
        int v = tbl[f][r][addr(f, r, key)];
        if (v < m) m = v;
        if (v > mx) mx = v;
      end
      if (mx != m) spread_hits++;
      return m;
    endfunction
  endclass

endpackage
