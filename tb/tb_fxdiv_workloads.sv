// tb_fxdiv_workloads: the three dividers at every operand width and
// precision of the published evaluation.
//
// Sizes (n = m = r, q): 32-bit operands with 8, 16, 32, 64 and 128
// fraction bits; 64-bit and 128-bit operands with 32, 64 and 128 fraction
// bits. For each size one non-restoring, one restoring and one SRT divider
// run side by side, each checked by an fxdiv_harness against a
// wide-integer reference (result, error flag, exact cycle count). For the
// non-restoring and restoring dividers a dividend with no leading zeros
// takes n + q + 1 clocks, the cycle count the evaluation's computation
// times correspond to; the harness checks that count on every division.
module tb_fxdiv_workloads;

  localparam int NCFG = 11;
  localparam int CFG_N [NCFG] = '{32, 32, 32, 32, 32, 64, 64, 64, 128, 128, 128};
  localparam int CFG_Q [NCFG] = '{8, 16, 32, 64, 128, 32, 64, 128, 32, 64, 128};
  localparam int NOPS = 40;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int cfg_checks   [NCFG][3];
  int cfg_failures [NCFG][3];
  int cfg_full     [NCFG][3];
  logic [2:0] cfg_fin [NCFG];

  for (genvar i = 0; i < NCFG; i++) begin : g_cfg
    localparam int N = CFG_N[i];
    localparam int Q = CFG_Q[i];
    for (genvar a = 0; a < 3; a++) begin : g_alg
      logic         load, start, done, error;
      logic [N-1:0] y, d, quo;
      logic [Q-1:0] rem;
      int           lzskip, dz, ovf, pre, ign;
      if (a == 0) begin : g_nr
        fxdiv_nonrestoring #(.N_W(N), .M_W(N), .R_W(N), .Q_W(Q)) u (.clk, .rst_n, .load,
            .start, .dividend(y), .divisor(d), .quotient(quo), .remainder(rem), .done, .error);
      end else if (a == 1) begin : g_rs
        fxdiv_restoring #(.N_W(N), .M_W(N), .R_W(N), .Q_W(Q)) u (.clk, .rst_n, .load,
            .start, .dividend(y), .divisor(d), .quotient(quo), .remainder(rem), .done, .error);
      end else begin : g_srt
        fxdiv_srt #(.N_W(N), .M_W(N), .R_W(N), .Q_W(Q)) u (.clk, .rst_n, .load,
            .start, .dividend(y), .divisor(d), .quotient(quo), .remainder(rem), .done, .error);
      end
      fxdiv_harness #(.N_W(N), .M_W(N), .R_W(N), .Q_W(Q), .NOPS(NOPS),
                      .SEED(1000 + 10 * i + a), .NORM_TIMING(a == 2)) h (
          .clk, .rst_n, .load, .start, .dividend(y), .divisor(d), .quotient(quo),
          .remainder(rem), .done, .error, .fin(cfg_fin[i][a]),
          .checks(cfg_checks[i][a]), .failures(cfg_failures[i][a]), .n_lzskip(lzskip),
          .n_fullsteps(cfg_full[i][a]), .n_dz(dz), .n_ovf(ovf), .n_preload(pre),
          .n_ignstart(ign));
    end
  end

  int checks, failures;

  initial begin
    bit all_fin;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all_fin = 1'b1;
      for (int i = 0; i < NCFG; i++) if (cfg_fin[i] != 3'b111) all_fin = 1'b0;
    end while (!all_fin);
    checks = 0; failures = 0;
    for (int i = 0; i < NCFG; i++) begin
      for (int a = 0; a < 3; a++) begin
        checks   += cfg_checks[i][a];
        failures += cfg_failures[i][a];
      end
      $display("n=%0d q=%0d: full-length division %0d clocks; checks %0d/%0d/%0d failures %0d/%0d/%0d",
               CFG_N[i], CFG_Q[i], CFG_N[i] + CFG_Q[i] + 1,
               cfg_checks[i][0], cfg_checks[i][1], cfg_checks[i][2],
               cfg_failures[i][0], cfg_failures[i][1], cfg_failures[i][2]);
      // Every size must have seen full-length divisions on the
      // non-restoring and restoring units.
      checks++;
      if (cfg_full[i][0] == 0 || cfg_full[i][1] == 0) begin
        failures++;
        $display("FAIL n=%0d q=%0d: no full-length division", CFG_N[i], CFG_Q[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
