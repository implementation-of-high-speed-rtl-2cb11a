// fxdiv_restoring: iterative unsigned fixed-point divider, restoring
// algorithm.
//
// Same function, interface and cycle count as fxdiv_nonrestoring:
// {quotient, remainder} = floor(Y * 2^Q_W / D), with an R_W-bit integer
// quotient and Q_W fractional quotient bits ("remainder"), one bit per
// clock after one set-up cycle.
//
// Each step shifts the unsigned partial remainder P left, brings in the
// next dividend bit b (zeros once the dividend is used up) and tries
//     T = 2P + b - D.
// If T >= 0 the quotient bit is 1 and P' = T; otherwise the quotient bit is
// 0 and the subtraction is undone, P' = 2P + b ("restoring" the remainder).
// P stays in [0, D), so it is held in M_W bits; the trial difference needs
// M_W + 2. The subtract followed by the restore multiplexer is the
// critical path, longer than the non-restoring step.
//
// Interface: `load` copies dividend/divisor into the operand registers;
// `start` begins a division on the loaded operands; `done` pulses for one
// cycle when quotient/remainder are valid (they hold until the next
// result); `error` (with done) flags division by zero or an integer
// quotient that does not fit R_W bits, with zero results. load may be used
// during a division; start is ignored while busy.
//
// Timing: N = 1 + (N_W - lz) + Q_W clocks from start to done, lz being the
// number of leading zero bits of the dividend (at most N_W + Q_W + 1).
// The recurrence, the port set, the generic widths and the cycle bound
// follow the published description; the leading-zero skip, handshake
// details, asynchronous active-low reset and overflow rule are this
// design's choices.
module fxdiv_restoring #(
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

  localparam int ITW = N_W + Q_W;
  localparam int PW  = M_W + 2;
  localparam int LZW = $clog2(N_W + 1);
  localparam int CW  = $clog2(ITW + 1);

  logic [N_W-1:0] y_ld;
  logic [M_W-1:0] d_ld;
  logic           init, err_det, step, last;
  logic [LZW-1:0] lz;
  logic [CW-1:0]  iters;

  logic [N_W-1:0]        yw;      // dividend bits still to enter, MSB first
  logic [M_W-1:0]        dw;      // working divisor
  logic [M_W-1:0]        pr;      // partial remainder
  logic [ITW-1:0]        qacc;    // quotient bits so far

  logic [M_W:0]          pr_sh;   // 2P + b
  logic [PW-1:0]         trial;   // 2P + b - D
  logic                  qbit;
  logic [M_W-1:0]        pr_nxt;
  logic [ITW-1:0]        q_nxt;
  logic [N_W-1:0]        q_int;

  fxdiv_ctrl #(.N_W(N_W), .M_W(M_W), .R_W(R_W), .Q_W(Q_W)) u_ctrl (
    .clk, .rst_n, .start, .y_ld, .d_ld, .iters,
    .init, .err_det, .lz, .step, .last, .done, .error
  );

  // Leading dividend zeros are skipped: one step per remaining bit.
  assign iters = CW'(ITW) - CW'(lz);

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

  // One restoring step.
  always_comb begin
    pr_sh  = {pr, yw[N_W-1]};
    trial  = PW'(pr_sh) - PW'(dw);
    qbit   = ~trial[PW-1];
    // When the trial fails, 2P + b < D, so it fits M_W bits again.
    pr_nxt = qbit ? trial[M_W-1:0] : pr_sh[M_W-1:0];
    q_nxt  = {qacc[ITW-2:0], qbit};
    q_int  = q_nxt[ITW-1:Q_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      yw        <= '0;
      dw        <= '0;
      pr        <= '0;
      qacc      <= '0;
      quotient  <= '0;
      remainder <= '0;
    end else if (init) begin
      yw   <= y_ld << lz;
      dw   <= d_ld;
      pr   <= '0;
      qacc <= '0;
      if (err_det) begin
        quotient  <= '0;
        remainder <= '0;
      end
    end else if (step) begin
      yw   <= yw << 1;
      pr   <= pr_nxt;
      qacc <= q_nxt;
      if (last) begin
        quotient  <= R_W'(q_int);
        remainder <= q_nxt[Q_W-1:0];
      end
    end
  end

endmodule
