// fxdiv_pkg: types shared by the fixed-point dividers.
//
// All three dividers (non-restoring, restoring, SRT) run the same
// three-phase sequence: wait for `start`, spend one initialisation cycle
// (leading-zero count, error checks, loading the working registers), then
// produce one quotient bit per clock. The one-cycle initialisation plus
// one bit per cycle follows the cycle counts the dividers are specified
// with (at most n + q + 1 clocks); the names and encoding are this design's.
package fxdiv_pkg;

  typedef enum logic [1:0] {
    S_IDLE = 2'd0,  // waiting for start; results held
    S_INIT = 2'd1,  // one set-up cycle: leading zeros, error check
    S_ITER = 2'd2   // one quotient bit per clock
  } fxdiv_state_t;

endpackage
