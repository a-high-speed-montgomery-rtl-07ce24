// Self-checking testbench of mmm_lu: all 2^11 input combinations.
// Expected values: T = low bits of the three words' sum, q(i+1) = T[1],
// q(i+2) = T[2], bypass = enable and neither q(i+1) nor A(i+1); the
// selected q~/A~ are the (i+2) values on bypass, the (i+1) values otherwise.
module tb_mmm_lu;
  logic [2:0] s1p_lo, c1p_lo, y_lo;
  logic       a_n1, a_n2, bypass_en, q_next, a_next, bypass;
  int checks = 0, failures = 0, n_bypass = 0;

  mmm_lu dut (.*);

  initial begin
    int tsum;
    logic eq1, eq2, eb;
    for (int v = 0; v < 2048; v++) begin
      {bypass_en, a_n2, a_n1, y_lo, c1p_lo, s1p_lo} = 11'(v);
      #1;
      tsum = int'(s1p_lo) + int'(c1p_lo) + int'(y_lo);
      eq1 = tsum[1];
      eq2 = tsum[2];
      eb  = bypass_en && !eq1 && !a_n1;
      checks += 3;
      if (bypass != eb) failures++;
      if (q_next != (eb ? eq2 : eq1)) failures++;
      if (a_next != (eb ? a_n2 : a_n1)) failures++;
      if (eb) n_bypass++;
    end
    checks++;
    if (n_bypass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
