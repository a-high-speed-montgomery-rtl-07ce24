// Latch-based clock gate for the rarely written operand registers.
//
// RB1, RB2, RD1, RD2 and RN are loaded once per multiplication and then only
// read, so their clock is switched off while they hold. The enable is
// captured by a latch that is transparent while clk is low, and the gated
// clock is clk AND the latched enable: gclk pulses in exactly the cycles
// whose enable was high before the rising edge, and a change of en while
// clk is high cannot cut a pulse short. Gating these five registers follows
// the published architecture; the cell itself is the usual integrated
// clock gate, this design's choice. The latch is intended: it is what makes
// the gate glitch-free.
module mmm_clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;

endmodule
