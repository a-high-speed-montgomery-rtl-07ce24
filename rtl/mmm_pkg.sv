// Shared types for the MMM42 Montgomery multiplier and the RSA exponentiator.
//
// The operand-select code is the pair {A~, q~} that the look-ahead unit
// stores at the end of every iteration: it picks the words w (multiplexer
// M1) and y (multiplexer M2) that the four-to-two adder adds to the
// carry-save state. The four codes follow the four cases of the algorithm:
// add nothing, add N, add B, add D = B + N.
package mmm_pkg;

  typedef enum logic [1:0] {
    SEL_ZERO = 2'b00,  // A~ = 0, q~ = 0: w = 0,  y = 0
    SEL_N    = 2'b01,  // A~ = 0, q~ = 1: w = N,  y = 0
    SEL_B    = 2'b10,  // A~ = 1, q~ = 0: w = B1, y = B2
    SEL_D    = 2'b11   // A~ = 1, q~ = 1: w = D1, y = D2
  } opsel_e;

  // Multiplier controller states.
  typedef enum logic [1:0] {
    MS_IDLE,   // waiting for start; result registers hold the last product
    MS_PRE,    // one cycle: the adder forms D = 2B + N into RD1/RD2
    MS_ITER    // iterations i = -1 .. K+2, some skipped by bypass
  } mult_state_e;

  // Exponentiator states.
  typedef enum logic [2:0] {
    XS_IDLE,    // waiting for start
    XS_TOMONT,  // M' = MMM(M, R^2 mod N): message into Montgomery form
    XS_SCAN,    // skip leading zero bits of the exponent, one per cycle
    XS_LOOP,    // decide the next step of square-and-multiply
    XS_SQR,     // X = MMM(X, X)
    XS_MUL,     // X = MMM(X, M')
    XS_FROM,    // X = MMM(X, 1): back out of Montgomery form
    XS_ADD      // carry-propagate X into binary and reduce below N
  } exp_state_e;

  // Bitwise majority: the carry output of a row of full adders.
  function automatic logic [1:0] fa(input logic a, input logic b, input logic c);
    return {(a & b) | (a & c) | (b & c), a ^ b ^ c};
  endfunction

endpackage
