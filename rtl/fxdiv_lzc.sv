// fxdiv_lzc: leading-zero counter.
//
// Counts the zero bits above the most significant one of `x`; an all-zero
// input gives W. Purely combinational: a priority scan from the LSB up, so
// the last (highest) one found sets the count. The dividers use it to skip
// the leading zero bits of the dividend, which is what makes their cycle
// count depend on the operand (fewer cycles for small dividends).
//
// Parameters: W, width of the input.
// Ports:      x (W bits) in, cnt ($clog2(W+1) bits) out.
module fxdiv_lzc #(
  parameter int W = 32
) (
  input  logic [W-1:0]           x,
  output logic [$clog2(W+1)-1:0] cnt
);

  localparam int CW = $clog2(W + 1);

  always_comb begin
    cnt = CW'(W);
    for (int i = 0; i < W; i++) begin
      if (x[i]) cnt = CW'(W - 1 - i);
    end
  end

endmodule
