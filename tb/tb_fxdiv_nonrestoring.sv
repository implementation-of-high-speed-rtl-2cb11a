// tb_fxdiv_nonrestoring: self-checking testbench for the non-restoring divider.
//
// Three instances run side by side, each driven and checked by an
// fxdiv_harness against a wide-integer reference (quotient, fractional
// bits, error flag and exact cycle count):
//   u_a  default widths 32/32/32/32 (dividend/divisor/quotient/fraction);
//   u_b  16-bit dividend, 8-bit divisor, 12-bit quotient, 5 fraction bits,
//        so that integer-quotient overflow occurs;
//   u_c  8-bit dividend, 12-bit divisor, 8-bit quotient, 10 fraction bits
//        (divisor wider than dividend).
// It also counts add steps (partial remainder negative) inside u_a and fails if there were none, and
// fails if any case the harnesses count (leading-zero skip, division by
// zero, overflow, early load, ignored start) never happened.
module tb_fxdiv_nonrestoring;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  typedef struct {
    int checks, failures, lzskip, full, dz, ovf, pre, ign;
  } cnt_t;

  // ---------------- instance a: defaults ----------------
  logic        a_load, a_start, a_done, a_error, a_fin;
  logic [31:0] a_y, a_d, a_q, a_r;
  cnt_t        ca;
  fxdiv_nonrestoring u_a (.clk, .rst_n, .load(a_load), .start(a_start), .dividend(a_y),
      .divisor(a_d), .quotient(a_q), .remainder(a_r), .done(a_done), .error(a_error));
  fxdiv_harness #(.N_W(32), .M_W(32), .R_W(32), .Q_W(32), .NOPS(600), .SEED(11)) h_a (
      .clk, .rst_n, .load(a_load), .start(a_start), .dividend(a_y), .divisor(a_d),
      .quotient(a_q), .remainder(a_r), .done(a_done), .error(a_error), .fin(a_fin),
      .checks(ca.checks), .failures(ca.failures), .n_lzskip(ca.lzskip),
      .n_fullsteps(ca.full), .n_dz(ca.dz), .n_ovf(ca.ovf), .n_preload(ca.pre),
      .n_ignstart(ca.ign));

  // ---------------- instance b: overflow possible ----------------
  logic        b_load, b_start, b_done, b_error, b_fin;
  logic [15:0] b_y;
  logic [7:0]  b_d;
  logic [11:0] b_q;
  logic [4:0]  b_r;
  cnt_t        cb;
  fxdiv_nonrestoring #(.N_W(16), .M_W(8), .R_W(12), .Q_W(5)) u_b (.clk, .rst_n,
      .load(b_load), .start(b_start), .dividend(b_y), .divisor(b_d), .quotient(b_q),
      .remainder(b_r), .done(b_done), .error(b_error));
  fxdiv_harness #(.N_W(16), .M_W(8), .R_W(12), .Q_W(5), .NOPS(1500), .SEED(22)) h_b (
      .clk, .rst_n, .load(b_load), .start(b_start), .dividend(b_y), .divisor(b_d),
      .quotient(b_q), .remainder(b_r), .done(b_done), .error(b_error), .fin(b_fin),
      .checks(cb.checks), .failures(cb.failures), .n_lzskip(cb.lzskip),
      .n_fullsteps(cb.full), .n_dz(cb.dz), .n_ovf(cb.ovf), .n_preload(cb.pre),
      .n_ignstart(cb.ign));

  // ---------------- instance c: divisor wider than dividend ----------------
  logic        c_load, c_start, c_done, c_error, c_fin;
  logic [7:0]  c_y, c_q;
  logic [11:0] c_d;
  logic [9:0]  c_r;
  cnt_t        cc;
  fxdiv_nonrestoring #(.N_W(8), .M_W(12), .R_W(8), .Q_W(10)) u_c (.clk, .rst_n,
      .load(c_load), .start(c_start), .dividend(c_y), .divisor(c_d), .quotient(c_q),
      .remainder(c_r), .done(c_done), .error(c_error));
  fxdiv_harness #(.N_W(8), .M_W(12), .R_W(8), .Q_W(10), .NOPS(1000), .SEED(33)) h_c (
      .clk, .rst_n, .load(c_load), .start(c_start), .dividend(c_y), .divisor(c_d),
      .quotient(c_q), .remainder(c_r), .done(c_done), .error(c_error), .fin(c_fin),
      .checks(cc.checks), .failures(cc.failures), .n_lzskip(cc.lzskip),
      .n_fullsteps(cc.full), .n_dz(cc.dz), .n_ovf(cc.ovf), .n_preload(cc.pre),
      .n_ignstart(cc.ign));

  // Internal mechanism of the algorithm, observed in u_a.
  int n_mech = 0;
  always @(posedge clk) if (rst_n && (u_a.step && u_a.pr[33])) n_mech++;

  int checks, failures;

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (a_fin && b_fin && c_fin);
    checks   = ca.checks + cb.checks + cc.checks;
    failures = ca.failures + cb.failures + cc.failures;
    need("leading-zero skip",     ca.lzskip + cb.lzskip + cc.lzskip);
    need("full-length division",  ca.full + cb.full + cc.full);
    need("division by zero",      ca.dz + cb.dz + cc.dz);
    need("overflow",              cb.ovf);
    need("early operand load",    ca.pre + cb.pre + cc.pre);
    need("start while busy",      ca.ign + cb.ign + cc.ign);
    need("add steps (partial remainder negative)", n_mech);
    $display("cases: lzskip=%0d full=%0d dz=%0d ovf=%0d preload=%0d ignstart=%0d add=%0d",
             ca.lzskip + cb.lzskip + cc.lzskip, ca.full + cb.full + cc.full,
             ca.dz + cb.dz + cc.dz, cb.ovf, ca.pre + cb.pre + cc.pre,
             ca.ign + cb.ign + cc.ign, n_mech);
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
