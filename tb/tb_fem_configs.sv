// tb_fem_configs: runs the FEM in every size the original evaluation used:
// FS (sketches) and H (hash functions per sketch) in {1, 2, 4} with
// 1024-entry tables, and FS = H = 2 with tables of 2048 to 16384 entries.
// Each configuration takes 3000 random calls at one call per cycle, checked
// against the software FEM; the core must accept every call (3000 calls in
// 3000 cycles) whatever the configuration.
module tb_fem_configs;
  localparam int NCFG = 13;
  localparam int CFS [NCFG] = '{1, 1, 1, 2, 2, 2, 4, 4, 4, 2, 2, 2, 2};
  localparam int CH  [NCFG] = '{1, 2, 4, 1, 2, 4, 1, 2, 4, 2, 2, 2, 2};
  localparam int CK  [NCFG] = '{1024, 1024, 1024, 1024, 1024, 1024, 1024, 1024, 1024, 2048, 4096, 8192, 16384};
  localparam int N = 3000;
  logic clk = 0, rst_n = 0;
  int   c [NCFG], f [NCFG], acc [NCFG], rc [NCFG];
  logic d [NCFG];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    tb_fem_cfg_run #(.FS(CFS[i]), .H(CH[i]), .K(CK[i]), .N(N)) run (
      .clk, .rst_n, .checks(c[i]), .failures(f[i]), .accepted(acc[i]), .run_cycles(rc[i]), .done(d[i]));
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit all;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < NCFG; i++) all &= d[i];
    end while (!all);
    for (int i = 0; i < NCFG; i++) begin
      checks += c[i] + 1;
      failures += f[i];
      if (acc[i] != N || rc[i] != N) begin failures++; $display("config %0d: %0d calls in %0d cycles", i, acc[i], rc[i]); end
      $display("FS=%0d H=%0d K=%0d: %0d calls in %0d cycles, %0d checks, %0d failures",
               CFS[i], CH[i], CK[i], acc[i], rc[i], c[i], f[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
