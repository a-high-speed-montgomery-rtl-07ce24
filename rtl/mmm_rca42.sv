// Four-to-two adder of the MMM42 multiplier with its operand multiplexers.
//
// One iteration adds two operand words to the carry-save state (S1, S2):
//   M3/M4 take the state registers RSC/RSS shifted right by one bit, or by
//   two bits when the stored bypass flag says that the previous iteration
//   skipped its successor (the division by four of a bypass step);
//   M1 picks w from {0, N, B1, D1} and M2 picks y from {0, 0, B2, D2} by the
//   select code {A~, q~};
//   RCA1 is a row of full adders on (S1, S2, w), RCA2 a row on RCA1's sum,
//   RCA1's carry and y. No carry travels along a row.
// The result T = t_s + t_c is returned unshifted; t_c is a carry word whose
// bit 0 is always zero. The caller stores T in RSS/RSC, and the next
// iteration divides it through M3/M4.
//
// Exact shifting: y is always even (B' is doubled and D2 is a carry word),
// and bit 0 of RCA1's carry word is empty, so RCA2's carry word t_c always
// has its two lowest bits zero. T is even, so t_s[0] = 0 and T/2 is the two
// words shifted by one; a bypass is only taken when T/2 is even too, so then
// t_s[1] = 0 as well and T/4 is the two words shifted by two. No bit is
// lost and no carry chain is needed for the division. For the same reason
// t_c[0] and c1p_lo[0] are constant zero; they are kept as ports so the
// words keep their natural weights.
//
// The low three bits of RCA1's outputs and of y go to the look-ahead unit,
// which forms q(i+1) and q(i+2) from them while RCA2 is still settling.
//
// The multiplexers, the two adder rows and the placement of M3/M4 in front
// of RCA1 follow the published MMM42 datapath; the proof that plain shifts
// suffice and the 3-bit hand-off to the look-ahead unit are this design's.
//
// Purely combinational.
module mmm_rca42
  import mmm_pkg::*;
#(
  parameter int unsigned W = 1028  // datapath width, K + 4
) (
  input  logic [W-1:0] rss,      // state register RSS (sum word of T)
  input  logic [W-1:0] rsc,      // state register RSC (carry word of T)
  input  logic         shift2,   // stored bypass flag: divide state by 4
  input  opsel_e       sel,      // {A~, q~}
  input  logic [W-1:0] rb1,      // B1 (already 2B in carry-save form)
  input  logic [W-1:0] rb2,      // B2
  input  logic [W-1:0] rd1,      // D1 (D = 2B + N)
  input  logic [W-1:0] rd2,      // D2
  input  logic [W-1:0] rn,       // N
  output logic [W-1:0] t_s,      // RCA2 sum word
  output logic [W-1:0] t_c,      // RCA2 carry word, already weighted (bit 0 = 0)
  output logic [2:0]   s1p_lo,   // RCA1 sum word, bits 2..0
  output logic [2:0]   c1p_lo,   // RCA1 carry word (weighted), bits 2..0
  output logic [2:0]   y_lo      // y, bits 2..0
);

  logic [W-1:0] s1, s2, w, y;
  logic [W-1:0] p_s, p_c, p_c_w, q_c;

  // M3 and M4
  always_comb begin
    if (shift2) begin
      s1 = rss >> 2;
      s2 = rsc >> 2;
    end else begin
      s1 = rss >> 1;
      s2 = rsc >> 1;
    end
  end

  // M1 and M2
  always_comb begin
    unique case (sel)
      SEL_ZERO: begin w = '0;  y = '0;  end
      SEL_N:    begin w = rn;  y = '0;  end
      SEL_B:    begin w = rb1; y = rb2; end
      SEL_D:    begin w = rd1; y = rd2; end
    endcase
  end

  // RCA1 and RCA2: rows of full adders
  always_comb begin
    for (int j = 0; j < W; j++) begin
      {p_c[j], p_s[j]} = fa(s1[j], s2[j], w[j]);
    end
    p_c_w = {p_c[W-2:0], 1'b0};
    for (int j = 0; j < W; j++) begin
      {q_c[j], t_s[j]} = fa(p_s[j], p_c_w[j], y[j]);
    end
    t_c = {q_c[W-2:0], 1'b0};
  end

  assign s1p_lo = p_s[2:0];
  assign c1p_lo = p_c_w[2:0];
  assign y_lo   = y[2:0];

endmodule
