// fxdiv_harness: stimulus and reference checker for one divider port set.
//
// Drives load/start/dividend/divisor of a divider and checks every result
// against a reference computed here with wide integer arithmetic:
//   {quotient, remainder} = floor(dividend * 2^Q_W / divisor),
//   error when divisor == 0 or the integer quotient needs more than R_W
//   bits (results then zero).
// It also checks the cycle count: done must come exactly
// 1 + (N_W - lz) + Q_W clocks after the start edge (lz = leading zeros of
// the dividend), or one clock after it on an error. With NORM_TIMING
// (the SRT divider, which normalises the divisor) the count is
// 1 + max(1, sY - sD + 1 + Q_W), sY and sD the significant bits of the
// dividend and the divisor.
// Operand mix: first all-ones / all-ones (a full-length division), then
// random values of random length, zero dividend, zero and unit
// divisor, all-ones operands, dividend below divisor. During a division it
// sometimes loads the next operands early (used by the following start
// without a new load) and sometimes pulses start, which must be ignored.
// After done it idles a few cycles and checks that the results hold.
// Counters report how often each of these cases occurred.
module fxdiv_harness #(
  parameter int          N_W  = 32,
  parameter int          M_W  = 32,
  parameter int          R_W  = 32,
  parameter int          Q_W  = 32,
  parameter int          NOPS = 200,
  parameter int unsigned SEED = 1,
  parameter bit          NORM_TIMING = 1'b0  // cycle count of the SRT divider
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic           load,
  output logic           start,
  output logic [N_W-1:0] dividend,
  output logic [M_W-1:0] divisor,
  input  logic [R_W-1:0] quotient,
  input  logic [Q_W-1:0] remainder,
  input  logic           done,
  input  logic           error,
  output logic           fin,
  output int             checks,
  output int             failures,
  output int             n_lzskip,     // divisions that skipped leading zeros
  output int             n_fullsteps,  // divisions with no leading zero to skip
  output int             n_dz,         // division-by-zero errors
  output int             n_ovf,        // overflow errors
  output int             n_preload,    // operands loaded during a division
  output int             n_ignstart    // start pulses given while busy
);

  localparam int ITW = N_W + Q_W;

  function automatic logic [N_W-1:0] rnd_y();
    logic [N_W-1:0] v = '0;
    for (int i = 0; i < N_W; i += 32) v = (v << 32) | N_W'($urandom);
    return v >> ($urandom % N_W);
  endfunction

  function automatic logic [M_W-1:0] rnd_d();
    logic [M_W-1:0] v = '0;
    for (int i = 0; i < M_W; i += 32) v = (v << 32) | M_W'($urandom);
    return v >> ($urandom % M_W);
  endfunction

  function automatic int clz(logic [N_W-1:0] v);
    int n = N_W;
    for (int i = 0; i < N_W; i++) if (v[i]) n = N_W - 1 - i;
    return n;
  endfunction

  function automatic int clzd(logic [M_W-1:0] v);
    int n = M_W;
    for (int i = 0; i < M_W; i++) if (v[i]) n = M_W - 1 - i;
    return n;
  endfunction

  task automatic pick(output logic [N_W-1:0] y, output logic [M_W-1:0] d);
    y = rnd_y();
    d = rnd_d();
    case ($urandom % 16)
      0: d = '0;
      1: y = '0;
      2: d = M_W'(1);
      3: y = N_W'($urandom % 256);
      4: begin y = '1; d = '1; end
      5: if (M_W <= N_W) y = N_W'(d) >> 1;
      default: ;
    endcase
  endtask

  task automatic fail(string what);
    failures++;
    if (failures <= 10) $display("FAIL %s at %0t", what, $time);
  endtask

  initial begin
    logic [N_W-1:0] y, ny;
    logic [M_W-1:0] d, nd;
    logic [ITW-1:0] full;
    logic [N_W-1:0] ip;
    logic [R_W-1:0] exp_q;
    logic [Q_W-1:0] exp_r;
    logic           exp_e, preloaded, do_pre, do_ign;
    int             cyc, exp_cyc, pre_at, ign_at, lz;

    load = 0; start = 0; dividend = '0; divisor = '0; fin = 0;
    checks = 0; failures = 0; n_lzskip = 0; n_fullsteps = 0; n_dz = 0;
    n_ovf = 0; n_preload = 0; n_ignstart = 0;
    void'($urandom(SEED));
    preloaded = 0;
    // The first division always runs full length (no leading zeros).
    ny = '1;
    nd = '1;
    wait (rst_n);
    repeat (2) @(negedge clk);

    for (int op = 0; op < NOPS; op++) begin
      y = ny; d = nd;
      // Reference.
      exp_e = (d == '0);
      full  = exp_e ? '0 : {y, Q_W'(0)} / ITW'(d);
      ip    = full[ITW-1:Q_W];
      if (!exp_e && ((ip >> R_W) != '0)) exp_e = 1'b1;
      exp_q = exp_e ? '0 : R_W'(ip);
      exp_r = exp_e ? '0 : full[Q_W-1:0];
      lz    = clz(y);
      if (exp_e) exp_cyc = 1;
      else if (NORM_TIMING) begin
        exp_cyc = (N_W - lz) - (M_W - clzd(d)) + 1 + Q_W;
        if (exp_cyc < 1) exp_cyc = 1;
        exp_cyc = exp_cyc + 1;
      end else exp_cyc = 1 + N_W - lz + Q_W;
      if (d == '0) n_dz++;
      else if (exp_e) n_ovf++;
      else if (lz > 0) n_lzskip++;
      else n_fullsteps++;

      // Start (with a load unless the operands were loaded early).
      if (!preloaded) begin
        load = 1; dividend = y; divisor = d;
      end
      start = 1;
      @(posedge clk);
      @(negedge clk);
      load = 0; start = 0;

      pick(ny, nd);
      preloaded = 0;
      do_pre = ($urandom % 3 == 0);
      do_ign = ($urandom % 3 == 0);
      pre_at = $urandom % 6;
      ign_at = $urandom % 6;
      cyc = 0;
      while (!done && cyc <= exp_cyc + 4) begin
        if (do_pre && cyc == pre_at) begin
          load = 1; dividend = ny; divisor = nd;
          preloaded = 1;
          n_preload++;
        end
        if (do_ign && cyc == ign_at) begin
          start = 1;
          n_ignstart++;
        end
        @(posedge clk);
        cyc++;
        @(negedge clk);
        load = 0; start = 0;
      end

      checks++;
      if (!done) fail($sformatf("no done for %0h / %0h", y, d));
      checks++;
      if (cyc != exp_cyc)
        fail($sformatf("cycles %0d, expected %0d for %0h / %0h", cyc, exp_cyc, y, d));
      checks++;
      if (error !== exp_e) fail($sformatf("error %0b for %0h / %0h", error, y, d));
      checks++;
      if (quotient !== exp_q || remainder !== exp_r)
        fail($sformatf("%0h / %0h gave %0h.%0h, expected %0h.%0h",
                       y, d, quotient, remainder, exp_q, exp_r));

      // done is a single-cycle pulse and the results hold afterwards.
      repeat ($urandom % 3 + 1) @(negedge clk);
      checks++;
      if (done || quotient !== exp_q || remainder !== exp_r || error !== exp_e)
        fail("results not held after done");
    end
    fin = 1;
  end

endmodule
