// tb_mfu_configs: runs the MFU integration in the configurations the MFU
// evaluation varies: MFU station depth 4, 8 and 16 at decode width 4, and
// decode width 8 and 16 at depth 8, each on an integer-heavy mix (2 % FP
// adds) and an FP-heavy mix (45 % FP adds). Each instance checks every MFU
// result (see mfu_cfg_harness). The testbench prints, per configuration, the
// cycles taken and the percentage of cycles the MFU station was full, and
// checks two expected trends: on the integer-heavy mix the full percentage
// does not grow with the depth, and the FP-heavy mix fills the 8-entry
// station more often than the integer-heavy one. (On the FP-heavy mix the
// MFU itself is the bottleneck, one FP add per cycle, so the station is full
// about equally often at every depth.)
module tb_mfu_configs;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NCFG = 10;
  logic done   [NCFG];
  int   chk    [NCFG];
  int   fail   [NCFG];
  int   cyc    [NCFG];
  int   full   [NCFG];
  int checks = 0, failures = 0;

  // index: 0..4 integer-heavy, 5..9 FP-heavy; within each: (DW,RS) =
  // (4,4) (4,8) (4,16) (8,8) (16,8)
  mfu_cfg_harness #(.DW(4),  .RS_DEPTH(4),  .FP_PCT(2),  .INT_PCT(73)) h0 (clk, done[0], chk[0], fail[0], cyc[0], full[0]);
  mfu_cfg_harness #(.DW(4),  .RS_DEPTH(8),  .FP_PCT(2),  .INT_PCT(73)) h1 (clk, done[1], chk[1], fail[1], cyc[1], full[1]);
  mfu_cfg_harness #(.DW(4),  .RS_DEPTH(16), .FP_PCT(2),  .INT_PCT(73)) h2 (clk, done[2], chk[2], fail[2], cyc[2], full[2]);
  mfu_cfg_harness #(.DW(8),  .RS_DEPTH(8),  .FP_PCT(2),  .INT_PCT(73)) h3 (clk, done[3], chk[3], fail[3], cyc[3], full[3]);
  mfu_cfg_harness #(.DW(16), .RS_DEPTH(8),  .FP_PCT(2),  .INT_PCT(73)) h4 (clk, done[4], chk[4], fail[4], cyc[4], full[4]);
  mfu_cfg_harness #(.DW(4),  .RS_DEPTH(4),  .FP_PCT(45), .INT_PCT(30)) h5 (clk, done[5], chk[5], fail[5], cyc[5], full[5]);
  mfu_cfg_harness #(.DW(4),  .RS_DEPTH(8),  .FP_PCT(45), .INT_PCT(30)) h6 (clk, done[6], chk[6], fail[6], cyc[6], full[6]);
  mfu_cfg_harness #(.DW(4),  .RS_DEPTH(16), .FP_PCT(45), .INT_PCT(30)) h7 (clk, done[7], chk[7], fail[7], cyc[7], full[7]);
  mfu_cfg_harness #(.DW(8),  .RS_DEPTH(8),  .FP_PCT(45), .INT_PCT(30)) h8 (clk, done[8], chk[8], fail[8], cyc[8], full[8]);
  mfu_cfg_harness #(.DW(16), .RS_DEPTH(8),  .FP_PCT(45), .INT_PCT(30)) h9 (clk, done[9], chk[9], fail[9], cyc[9], full[9]);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    string name [NCFG] = '{"int DW4 RS4", "int DW4 RS8", "int DW4 RS16", "int DW8 RS8", "int DW16 RS8",
                           "fp  DW4 RS4", "fp  DW4 RS8", "fp  DW4 RS16", "fp  DW8 RS8", "fp  DW16 RS8"};
    real pct [NCFG];
    @(posedge clk);
    for (int i = 0; i < NCFG; i++) wait (done[i]);
    for (int i = 0; i < NCFG; i++) begin
      checks += chk[i]; failures += fail[i];
      pct[i] = 100.0 * full[i] / cyc[i];
      $display("%s: %0d cycles, station full %0.1f%%", name[i], cyc[i], pct[i]);
    end
    checks++;
    if (!(pct[0] >= pct[1] && pct[1] >= pct[2])) begin
      failures++; $display("FAIL full percentage grows with depth on the integer-heavy mix");
    end
    checks++;
    if (!(pct[6] > pct[1])) begin failures++; $display("FAIL FP-heavy mix does not fill the station more"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
