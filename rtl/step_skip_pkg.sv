// Shared types of the step-skipping logarithm unit.
//
// The normalising factor of one step is c(i) = 1 + a(i)*2^-i with a(i) in {-1, 0, +1}.
// digit_e encodes a(i); ln_state_e is the state of the iterative controller.
package step_skip_pkg;

  typedef enum logic [1:0] {
    A_ZERO  = 2'b00,   // a(i) = 0  : c(i) = 1, step is skipped
    A_PLUS  = 2'b01,   // a(i) = +1 : x <- x + x*2^-i, y <- y - ln(1+2^-i)
    A_MINUS = 2'b10    // a(i) = -1 : x <- x - x*2^-i, y <- y - ln(1-2^-i)
  } digit_e;

  typedef enum logic [0:0] {
    LN_IDLE = 1'b0,
    LN_RUN  = 1'b1
  } ln_state_e;

endpackage
