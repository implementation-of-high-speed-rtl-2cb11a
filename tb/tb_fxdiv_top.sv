// tb_fxdiv_top: end-to-end testbench of fxdiv_top, with the integer quotient narrowed to
// 24 bits (32-bit dividend, divisor and fraction) so that overflow can occur.
//
// All three dividers of the top (non-restoring, restoring, SRT) run at the
// same time, each driven and checked by its own fxdiv_harness against a
// wide-integer reference: quotient, fractional bits, error flag and the
// exact number of clocks from start to done. Counted, and required to
// happen at least once each: leading-zero skip, full-length division,
// division by zero, integer-quotient overflow, operands loaded during a division, start
// ignored while busy, the non-restoring add step, the restoring restore
// step, the SRT negative digit and the SRT final correction.
module tb_fxdiv_top;

  localparam int N_W = 32, M_W = 32, R_W = 24, Q_W = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  typedef struct {
    int checks, failures, lzskip, full, dz, ovf, pre, ign;
  } cnt_t;

  logic           nr_load, nr_start, nr_done, nr_error, nr_fin;
  logic [N_W-1:0] nr_dividend;
  logic [M_W-1:0] nr_divisor;
  logic [R_W-1:0] nr_quotient;
  logic [Q_W-1:0] nr_remainder;
  logic           rs_load, rs_start, rs_done, rs_error, rs_fin;
  logic [N_W-1:0] rs_dividend;
  logic [M_W-1:0] rs_divisor;
  logic [R_W-1:0] rs_quotient;
  logic [Q_W-1:0] rs_remainder;
  logic           srt_load, srt_start, srt_done, srt_error, srt_fin;
  logic [N_W-1:0] srt_dividend;
  logic [M_W-1:0] srt_divisor;
  logic [R_W-1:0] srt_quotient;
  logic [Q_W-1:0] srt_remainder;
  cnt_t           c_nr, c_rs, c_srt;

  fxdiv_top #(.N_W(N_W), .M_W(M_W), .R_W(R_W), .Q_W(Q_W)) dut (.*);

  fxdiv_harness #(.N_W(N_W), .M_W(M_W), .R_W(R_W), .Q_W(Q_W), .NOPS(800), .SEED(101)) h_nr (
      .clk, .rst_n, .load(nr_load), .start(nr_start), .dividend(nr_dividend),
      .divisor(nr_divisor), .quotient(nr_quotient), .remainder(nr_remainder),
      .done(nr_done), .error(nr_error), .fin(nr_fin),
      .checks(c_nr.checks), .failures(c_nr.failures), .n_lzskip(c_nr.lzskip),
      .n_fullsteps(c_nr.full), .n_dz(c_nr.dz), .n_ovf(c_nr.ovf), .n_preload(c_nr.pre),
      .n_ignstart(c_nr.ign));
  fxdiv_harness #(.N_W(N_W), .M_W(M_W), .R_W(R_W), .Q_W(Q_W), .NOPS(800), .SEED(202)) h_rs (
      .clk, .rst_n, .load(rs_load), .start(rs_start), .dividend(rs_dividend),
      .divisor(rs_divisor), .quotient(rs_quotient), .remainder(rs_remainder),
      .done(rs_done), .error(rs_error), .fin(rs_fin),
      .checks(c_rs.checks), .failures(c_rs.failures), .n_lzskip(c_rs.lzskip),
      .n_fullsteps(c_rs.full), .n_dz(c_rs.dz), .n_ovf(c_rs.ovf), .n_preload(c_rs.pre),
      .n_ignstart(c_rs.ign));
  fxdiv_harness #(.N_W(N_W), .M_W(M_W), .R_W(R_W), .Q_W(Q_W), .NOPS(800), .SEED(303),
                  .NORM_TIMING(1'b1)) h_srt (
      .clk, .rst_n, .load(srt_load), .start(srt_start), .dividend(srt_dividend),
      .divisor(srt_divisor), .quotient(srt_quotient), .remainder(srt_remainder),
      .done(srt_done), .error(srt_error), .fin(srt_fin),
      .checks(c_srt.checks), .failures(c_srt.failures), .n_lzskip(c_srt.lzskip),
      .n_fullsteps(c_srt.full), .n_dz(c_srt.dz), .n_ovf(c_srt.ovf), .n_preload(c_srt.pre),
      .n_ignstart(c_srt.ign));

  // Algorithm-internal events, observed inside the top.
  int n_nr_add = 0, n_rs_restore = 0, n_srt_neg = 0, n_srt_corr = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_nr.step && dut.u_nr.pr[M_W+1])     n_nr_add++;
    if (dut.u_rs.step && !dut.u_rs.qbit)         n_rs_restore++;
    if (dut.u_srt.step && dut.u_srt.dig_neg)     n_srt_neg++;
    if (dut.u_srt.last && dut.u_srt.pr_nxt[M_W+1]) n_srt_corr++;
  end

  int checks, failures;

  task automatic need(string what, int n);
    checks++;
    $display("  %-36s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (nr_fin && rs_fin && srt_fin);
    checks   = c_nr.checks + c_rs.checks + c_srt.checks;
    failures = c_nr.failures + c_rs.failures + c_srt.failures;
    $display("per divider (nr / rs / srt): checks %0d / %0d / %0d, failures %0d / %0d / %0d",
             c_nr.checks, c_rs.checks, c_srt.checks,
             c_nr.failures, c_rs.failures, c_srt.failures);
    need("leading-zero skip",      c_nr.lzskip + c_rs.lzskip + c_srt.lzskip);
    need("full-length division",   c_nr.full + c_rs.full + c_srt.full);
    need("division by zero",       c_nr.dz + c_rs.dz + c_srt.dz);
    need("overflow",               c_nr.ovf + c_rs.ovf + c_srt.ovf);
    need("early operand load",     c_nr.pre + c_rs.pre + c_srt.pre);
    need("start while busy",       c_nr.ign + c_rs.ign + c_srt.ign);
    need("non-restoring add step", n_nr_add);
    need("restoring restore step", n_rs_restore);
    need("SRT negative digit",     n_srt_neg);
    need("SRT final correction",   n_srt_corr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
