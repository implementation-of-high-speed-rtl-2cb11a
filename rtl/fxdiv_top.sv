// fxdiv_top: the three fixed-point dividers side by side.
//
// The non-restoring divider is the design's main unit (the fastest of the
// three); the restoring and SRT dividers implement the same function with
// the same interface and cycle count and are brought out next to it, each
// with its own operand, result and control ports, so that any of them can
// be used or compared. Prefixes: nr_ non-restoring, rs_ restoring,
// srt_ SRT. All three share clk and rst_n (asynchronous, active low).
//
// Per divider: load (copy dividend/divisor into the operand registers),
// start (begin a division on the loaded operands), dividend (N_W bits),
// divisor (M_W bits), quotient (R_W-bit integer part), remainder (Q_W
// fractional quotient bits), done (one-cycle pulse when results are
// valid), error (with done: division by zero or integer-quotient overflow).
// A division takes 1 + (N_W - lz) + Q_W clocks from start to done, lz being
// the leading zeros of the dividend. Default widths are 32/32/32/32 bits.
// Placing the three units side by side in one top is this design's choice.
module fxdiv_top #(
  parameter int N_W = 32,
  parameter int M_W = 32,
  parameter int R_W = 32,
  parameter int Q_W = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  // non-restoring divider
  input  logic           nr_load,
  input  logic           nr_start,
  input  logic [N_W-1:0] nr_dividend,
  input  logic [M_W-1:0] nr_divisor,
  output logic [R_W-1:0] nr_quotient,
  output logic [Q_W-1:0] nr_remainder,
  output logic           nr_done,
  output logic           nr_error,
  // restoring divider
  input  logic           rs_load,
  input  logic           rs_start,
  input  logic [N_W-1:0] rs_dividend,
  input  logic [M_W-1:0] rs_divisor,
  output logic [R_W-1:0] rs_quotient,
  output logic [Q_W-1:0] rs_remainder,
  output logic           rs_done,
  output logic           rs_error,
  // SRT divider
  input  logic           srt_load,
  input  logic           srt_start,
  input  logic [N_W-1:0] srt_dividend,
  input  logic [M_W-1:0] srt_divisor,
  output logic [R_W-1:0] srt_quotient,
  output logic [Q_W-1:0] srt_remainder,
  output logic           srt_done,
  output logic           srt_error
);

  fxdiv_nonrestoring #(.N_W(N_W), .M_W(M_W), .R_W(R_W), .Q_W(Q_W)) u_nr (
    .clk, .rst_n,
    .load(nr_load), .start(nr_start), .dividend(nr_dividend), .divisor(nr_divisor),
    .quotient(nr_quotient), .remainder(nr_remainder), .done(nr_done), .error(nr_error)
  );

  fxdiv_restoring #(.N_W(N_W), .M_W(M_W), .R_W(R_W), .Q_W(Q_W)) u_rs (
    .clk, .rst_n,
    .load(rs_load), .start(rs_start), .dividend(rs_dividend), .divisor(rs_divisor),
    .quotient(rs_quotient), .remainder(rs_remainder), .done(rs_done), .error(rs_error)
  );

  fxdiv_srt #(.N_W(N_W), .M_W(M_W), .R_W(R_W), .Q_W(Q_W)) u_srt (
    .clk, .rst_n,
    .load(srt_load), .start(srt_start), .dividend(srt_dividend), .divisor(srt_divisor),
    .quotient(srt_quotient), .remainder(srt_remainder), .done(srt_done), .error(srt_error)
  );

endmodule
