// Self-checking testbench of mmm_clock_gate.
// The enable changes at random times in both clock phases. Expected: the
// gated clock is low whenever clk is low, and during a high phase it equals
// the enable as it was just before that rising edge, however the enable
// moves inside the phase. A counter on the gated clock must count exactly
// the enabled cycles.
module tb_mmm_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0, pulses = 0, expected_pulses = 0, cycles = 0;
  logic en_at_edge = 1'b0;

  mmm_clock_gate dut (.*);

  always @(posedge gclk) pulses++;

  initial begin
    for (int c = 0; c < 2000; c++) begin
      // low phase: enable may change, gclk must stay low
      #2 en = 1'($urandom);
      #1 checks++; if (gclk) failures++;
      #2 en_at_edge = en;
      clk = 1'b1;
      cycles++;
      if (en_at_edge) expected_pulses++;
      // high phase: enable toggles, gclk must hold
      #1 checks++; if (gclk != en_at_edge) failures++;
      #1 en = ~en;
      #1 checks++; if (gclk != en_at_edge) failures++;
      #1 en = 1'($urandom);
      #1 checks++; if (gclk != en_at_edge) failures++;
      clk = 1'b0;
    end
    #1;
    checks++;
    if (pulses != expected_pulses) begin
      failures++;
      $display("pulses %0d, expected %0d", pulses, expected_pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
