// Modified barrel register full adder (MBRFA).
//
// Holds the multiplier A in carry-save form in two shift registers RA1 and
// RA2 and turns it into binary bits on the fly. Two chained full adders add
// the two lowest bits of RA1 and RA2 and the stored carry, giving A(i+1)
// (with carry(i+1)) and A(i+2) (with carry(i+2)) in the same cycle. When the
// look-ahead unit signals bypass(i+1), carry(i+2) is stored and both
// registers shift right by two; otherwise carry(i+1) is stored and they
// shift by one. Zeros enter from the top, so bits above the operand read as
// the dummy zeros of the extended operand. This structure is the
// published MBRFA.
//
// Interface: load (priority) captures a1/a2 and clears the carry; step
// advances by one or two bits according to bypass. a_n1/a_n2 are
// combinational from the registers. Reset clears everything (own choice).
module mmm_mbrfa
  import mmm_pkg::*;
#(
  parameter int unsigned AW = 1026  // operand width, K + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] a1,
  input  logic [AW-1:0] a2,
  input  logic          step,
  input  logic          bypass,
  output logic          a_n1,    // A(i+1)
  output logic          a_n2     // A(i+2)
);

  logic [AW-1:0] ra1, ra2;
  logic          carry_q;
  logic          c_n1, c_n2;

  assign {c_n1, a_n1} = fa(ra1[0], ra2[0], carry_q);
  assign {c_n2, a_n2} = fa(ra1[1], ra2[1], c_n1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra1     <= '0;
      ra2     <= '0;
      carry_q <= 1'b0;
    end else if (load) begin
      ra1     <= a1;
      ra2     <= a2;
      carry_q <= 1'b0;
    end else if (step) begin
      if (bypass) begin
        ra1     <= ra1 >> 2;
        ra2     <= ra2 >> 2;
        carry_q <= c_n2;
      end else begin
        ra1     <= ra1 >> 1;
        ra2     <= ra2 >> 1;
        carry_q <= c_n1;
      end
    end
  end

endmodule
