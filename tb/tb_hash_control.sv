// tb_hash_control: checks key selection and the flag value of the four
// application sketch configurations: unused fields must be zero, used ones
// passed through, and the value +1 for SYN, -1 for ACK, 0 for both or none.
module tb_hash_control;
  import fem_pkg::*;
  pkt_key_t key;
  flags_t   flags;
  logic [31:0]       k0 [4], k1 [4], k2 [4];
  logic signed [1:0] d  [4];
  int checks = 0, failures = 0;
  localparam fs_cfg_t CF [4] = '{FS1_CFG, FS2_CFG, FS3_CFG, FS4_CFG};

  for (genvar i = 0; i < 4; i++) begin : g
    hash_control #(.CFG(CF[i])) dut (.key, .flags, .key0(k0[i]), .key1(k1[i]), .key2(k2[i]), .delta(d[i]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e0 [4], e1 [4], e2 [4];
    int ed;
    for (int n = 0; n < 300; n++) begin
      key = {$urandom, $urandom, 16'($urandom), 16'($urandom)};
      flags = 6'($urandom);
      #1;
      // FS1 (dst ip, dst port), FS2 (dst ip), FS3 (src ip), FS4 (src ip, dst ip)
      e0 = '{0, 0, key.src_ip, key.src_ip};
      e1 = '{key.dst_ip, key.dst_ip, 0, key.dst_ip};
      e2 = '{{16'h0, key.dst_port}, 0, 0, 0};
      ed = (flags[1] ? 1 : 0) - (flags[4] ? 1 : 0);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (k0[i] !== e0[i] || k1[i] !== e1[i] || k2[i] !== e2[i] || int'(d[i]) != ed) begin
          failures++;
          $display("FS%0d: %h %h %h %0d flags %b", i + 1, k0[i], k1[i], k2[i], d[i], flags);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
