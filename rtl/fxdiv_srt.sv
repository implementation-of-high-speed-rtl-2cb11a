// fxdiv_srt: iterative unsigned fixed-point divider, radix-2 SRT
// algorithm with quotient digits {-1, 0, 1}.
//
// Same function and interface as fxdiv_nonrestoring:
// {quotient, remainder} = floor(Y * 2^Q_W / D), with an R_W-bit integer
// quotient and Q_W fractional quotient bits ("remainder"), one digit per
// clock after one set-up cycle.
//
// Set-up cycle: the divisor is normalised, Dn = D << s with s its leading
// zero count, so that Dn >= 2^(M_W-1); the quotient is then
// floor(Y * 2^(Q_W+s) / Dn), the same number. The partial remainder P is
// preloaded with the first significant dividend bits, as many as are
// certain to be below Dn (up to M_W-1 of them), since their quotient digits
// are zero; the rest of the dividend and then zeros enter one bit per step.
//
// Step: S = 2P + b (b the next bit). The digit is chosen by "limited
// comparison" of S with the constants +-2^(M_W-1) (half the divisor range),
// which needs only the top four bits of S, not a full-width compare:
//     q = 1 if S >= 2^(M_W-1),  q = -1 if S < -2^(M_W-1),  else q = 0,
// then P' = S - q*Dn. P stays in [-Dn, Dn), held in M_W + 2 signed bits.
// The signed-digit quotient is converted to binary on the fly: two
// registers hold Q and Q - 1 (mod 2^(N_W+Q_W)) and each digit updates both
// by a shift and a choice between them:
//     q =  1: Q' = 2Q + 1,     QM' = 2Q
//     q =  0: Q' = 2Q,         QM' = 2QM + 1
//     q = -1: Q' = 2QM + 1,    QM' = 2QM
// If the final partial remainder is negative the quotient is one too
// large; the correction takes QM instead of Q in the same clock as the
// last digit, so it costs no extra cycle.
//
// Interface: `load` copies dividend/divisor into the operand registers;
// `start` begins a division on the loaded operands; `done` pulses for one
// cycle when quotient/remainder are valid (they hold until the next
// result); `error` (with done) flags division by zero or an integer
// quotient that does not fit R_W bits, with zero results. load may be used
// during a division; start is ignored while busy.
//
// Timing: N = 1 + K clocks from start to done, with
// K = max(1, sY - sD + 1 + Q_W), sY and sD being the significant bits of
// dividend and divisor; so at most N_W + Q_W + 1, fewer for short
// dividends and long divisors.
// The digit set, the limited-comparison selection, the correction of a
// negative final remainder, its on-the-fly conversion, the port set, the
// generic widths and the cycle bound follow the published description.
// The normalisation, the selection constants, the remainder preload, the
// conversion registers, handshake details, asynchronous active-low reset
// and overflow rule are this design's choices. Requires M_W >= 2.
module fxdiv_srt #(
  parameter int N_W = 32,   // dividend width n
  parameter int M_W = 32,   // divisor width m
  parameter int R_W = 32,   // integer quotient width r
  parameter int Q_W = 32    // fractional quotient ("remainder") width q
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic           start,
  input  logic [N_W-1:0] dividend,
  input  logic [M_W-1:0] divisor,
  output logic [R_W-1:0] quotient,
  output logic [Q_W-1:0] remainder,
  output logic           done,
  output logic           error
);

  if (M_W < 2) begin : g_bad_m
    $error("fxdiv_srt: M_W must be at least 2");
  end

  localparam int ITW = N_W + Q_W;
  localparam int PW  = M_W + 2;
  localparam int XW  = N_W + M_W - 1;    // preload remainder bits + dividend stream
  localparam int LZW = $clog2(N_W + 1);
  localparam int DZW = $clog2(M_W + 1);
  localparam int CW  = $clog2(ITW + 1);

  logic [N_W-1:0] y_ld;
  logic [M_W-1:0] d_ld;
  logic           init, err_det, step, last;
  logic [LZW-1:0] lz;
  logic [DZW-1:0] lzd;
  logic [CW-1:0]  iters;
  logic [XW-1:0]  x_pre;

  logic [N_W-1:0]        yw;      // dividend bits still to enter, MSB first
  logic [M_W-1:0]        dw;      // normalised divisor Dn
  logic signed [PW-1:0]  pr;      // partial remainder
  logic [ITW-1:0]        qacc;    // converted quotient Q so far
  logic [ITW-1:0]        qmacc;   // Q - 1 (mod 2^ITW)

  logic signed [PW-1:0]  pr_sh, pr_nxt;
  logic [PW-M_W:0]       sh_top;  // the bits the digit selection looks at
  logic                  dig_pos, dig_neg;
  logic [ITW-1:0]        q_nxt, qm_nxt, q_fin;
  logic [N_W-1:0]        q_int;

  fxdiv_ctrl #(.N_W(N_W), .M_W(M_W), .R_W(R_W), .Q_W(Q_W)) u_ctrl (
    .clk, .rst_n, .start, .y_ld, .d_ld, .iters,
    .init, .err_det, .lz, .step, .last, .done, .error
  );

  fxdiv_lzc #(.W(M_W)) u_lzd (.x(d_ld), .cnt(lzd));

  // Set-up: preload shift t and step count K = N_W + Q_W + s - t.
  // t = lz + M_W - 1 moves the first M_W-1 significant dividend bits into
  // the remainder; it is capped so that at least one step remains.
  always_comb begin
    int t;
    t = int'(lz) + M_W - 1;
    if (t > N_W + Q_W + int'(lzd) - 1) t = N_W + Q_W + int'(lzd) - 1;
    iters = CW'(N_W + Q_W + int'(lzd) - t);
    x_pre = XW'(y_ld) << t;
  end

  // Operand registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_ld <= '0;
      d_ld <= '0;
    end else if (load) begin
      y_ld <= dividend;
      d_ld <= divisor;
    end
  end

  // One SRT step with on-the-fly conversion.
  always_comb begin
    pr_sh   = {pr[PW-2:0], yw[N_W-1]};
    sh_top  = pr_sh[PW-1:M_W-1];
    dig_pos = !sh_top[PW-M_W] && (sh_top[PW-M_W-1:0] != '0);
    dig_neg =  sh_top[PW-M_W] && (sh_top[PW-M_W-1:0] != '1);
    if (dig_pos) begin
      pr_nxt = pr_sh - PW'(dw);
      q_nxt  = {qacc[ITW-2:0], 1'b1};
      qm_nxt = {qacc[ITW-2:0], 1'b0};
    end else if (dig_neg) begin
      pr_nxt = pr_sh + PW'(dw);
      q_nxt  = {qmacc[ITW-2:0], 1'b1};
      qm_nxt = {qmacc[ITW-2:0], 1'b0};
    end else begin
      pr_nxt = pr_sh;
      q_nxt  = {qacc[ITW-2:0], 1'b0};
      qm_nxt = {qmacc[ITW-2:0], 1'b1};
    end
    // Final correction: a negative last remainder means Q is one too big.
    q_fin = pr_nxt[PW-1] ? qm_nxt : q_nxt;
    q_int = q_fin[ITW-1:Q_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      yw        <= '0;
      dw        <= '0;
      pr        <= '0;
      qacc      <= '0;
      qmacc     <= '1;
      quotient  <= '0;
      remainder <= '0;
    end else if (init) begin
      yw    <= x_pre[N_W-1:0];
      pr    <= PW'(x_pre[XW-1:N_W]);
      dw    <= d_ld << lzd;
      qacc  <= '0;
      qmacc <= '1;
      if (err_det) begin
        quotient  <= '0;
        remainder <= '0;
      end
    end else if (step) begin
      yw    <= yw << 1;
      pr    <= pr_nxt;
      qacc  <= q_nxt;
      qmacc <= qm_nxt;
      if (last) begin
        quotient  <= R_W'(q_int);
        remainder <= q_fin[Q_W-1:0];
      end
    end
  end

endmodule
