// fxdiv_ctrl: sequencing and error detection shared by the dividers.
//
// A divider holds its operands in load registers (y_ld, d_ld). When
// `start` is seen in S_IDLE the controller moves to S_INIT for one cycle.
// In that cycle it counts the leading zeros of the dividend (lz) and checks
// the two error conditions:
//   * division by zero, d_ld == 0;
//   * quotient overflow, possible only when the integer quotient is
//     narrower than the dividend (R_W < N_W): the division overflows when
//     y_ld >= 2^R_W * d_ld, i.e. when (y_ld >> R_W) >= d_ld.
// On an error it ends the operation at once (done and error high).
// Otherwise it loads the iteration counter with the number of steps the
// datapath asks for (`iters`, one per quotient digit still to be produced;
// N_W - lz + Q_W for the non-restoring and restoring dividers) and stays
// in S_ITER that many cycles.
// The datapath does one step per S_ITER cycle; `last` marks the final step.
//
// Timing: start sampled on edge 0; S_INIT during the next cycle; iteration
// steps on edges 2 .. K+1 with K = iters; done is high for one cycle
// after edge K+1. So an operation takes N = K + 1 clocks from the start
// edge (at most N_W + Q_W + 1); on an error done and error come on the
// first edge after the start edge.
// The overflow test is this design's reading of the overflow check the
// algorithm requires before a division; the counter and state encoding are
// also this design's own. error stays valid until the next start.
//
// Parameters: N_W dividend, M_W divisor, R_W integer quotient and Q_W
// fractional quotient widths (Q_W >= 1).
module fxdiv_ctrl
  import fxdiv_pkg::*;
#(
  parameter int N_W = 32,
  parameter int M_W = 32,
  parameter int R_W = 32,
  parameter int Q_W = 32,
  localparam int ITW = N_W + Q_W,           // quotient bits produced
  localparam int LZW = $clog2(N_W + 1),
  localparam int CW  = $clog2(ITW + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N_W-1:0] y_ld,     // loaded dividend
  input  logic [M_W-1:0] d_ld,     // loaded divisor
  input  logic [CW-1:0]  iters,    // steps this operation needs, valid during init (>= 1)
  output logic           init,     // S_INIT cycle: datapath loads its working registers
  output logic           err_det,  // valid during init: the operation will fail
  output logic [LZW-1:0] lz,       // leading zeros of y_ld, valid during init
  output logic           step,     // S_ITER cycle: datapath produces one quotient bit
  output logic           last,     // the final step of the operation
  output logic           done,     // one-cycle pulse: results valid
  output logic           error     // division by zero or overflow, with done
);

  if (Q_W < 1) begin : g_bad_q
    $error("fxdiv_ctrl: Q_W must be at least 1");
  end

  fxdiv_state_t state;
  logic [CW-1:0] cnt;
  logic          ovf;
  logic          dzero;

  fxdiv_lzc #(.W(N_W)) u_lzc (.x(y_ld), .cnt(lz));

  assign dzero = (d_ld == '0);

  if (R_W < N_W) begin : g_ovf
    localparam int HW = N_W - R_W;
    logic [HW-1:0] y_hi;
    assign y_hi = y_ld[N_W-1:R_W];
    if (HW > M_W) begin : g_wide
      assign ovf = (y_hi >= HW'(d_ld));
    end else begin : g_narrow
      assign ovf = (M_W'(y_hi) >= d_ld);
    end
  end else begin : g_no_ovf
    assign ovf = 1'b0;
  end

  assign init    = (state == S_INIT);
  assign step    = (state == S_ITER);
  assign last    = step && (cnt == CW'(1));
  assign err_det = dzero || ovf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
      error <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state <= S_INIT;
            error <= 1'b0;
          end
        end
        S_INIT: begin
          if (err_det) begin
            state <= S_IDLE;
            error <= 1'b1;
            done  <= 1'b1;
          end else begin
            state <= S_ITER;
            cnt   <= iters;
          end
        end
        S_ITER: begin
          cnt <= cnt - CW'(1);
          if (cnt == CW'(1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The counter never runs out while iterating: every operation asks for
  // at least one step.
  a_cnt_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
                                  step |-> cnt != '0);

  // done is a single-cycle pulse and only ends an operation.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n)
                                 done |=> !done);
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                done |-> state == S_IDLE);

endmodule
