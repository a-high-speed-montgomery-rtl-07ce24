// Look-ahead unit (LU) of the MMM42 multiplier.
//
// During iteration i it decides whether iteration i+1 is superfluous.
// Iteration i+1 adds nothing when A(i+1) = 0 and q(i+1) = 0, so
// bypass(i+1) = NOR(q(i+1), A(i+1)), and then the next clock cycle runs
// iteration i+2 directly with q~ = q(i+2) and A~ = A(i+2); otherwise it runs
// iteration i+1 with q~ = q(i+1) and A~ = A(i+1). The NOR gate and the two
// 2-to-1 multiplexers follow the published look-ahead unit.
//
// Quotient bits: the multiplicand is stored doubled (2B, even), so a
// quotient bit is just the parity of the state. With T the sum this
// iteration is producing, q(i+1) = bit 1 of T and q(i+2) = bit 2 of T (in
// the bypass case, where S(i+2) = T/4). This design forms them from a 3-bit
// sum of the low bits of RCA1's two outputs and of y; the published unit draws
// q(i+1) as one RCA1 bit and q(i+2) as the XOR of two, which depends on an
// operand encoding that is not specified.
//
// bypass_en lets the controller forbid a bypass near the end of the loop.
// Purely combinational.
module mmm_lu (
  input  logic [2:0] s1p_lo,     // RCA1 sum word, bits 2..0
  input  logic [2:0] c1p_lo,     // RCA1 carry word (weighted), bits 2..0
  input  logic [2:0] y_lo,       // operand y, bits 2..0
  input  logic       a_n1,       // A(i+1) from the MBRFA
  input  logic       a_n2,       // A(i+2) from the MBRFA
  input  logic       bypass_en,  // bypass allowed in this iteration
  output logic       q_next,     // q~ for the next cycle
  output logic       a_next,     // A~ for the next cycle
  output logic       bypass      // bypass(i+1)
);

  logic [2:0] t_lo;
  logic       q_n1, q_n2;

  assign t_lo   = s1p_lo + c1p_lo + y_lo;
  assign q_n1   = t_lo[1];
  assign q_n2   = t_lo[2];
  assign bypass = bypass_en & ~(q_n1 | a_n1);
  assign q_next = bypass ? q_n2 : q_n1;
  assign a_next = bypass ? a_n2 : a_n1;

endmodule
