// Self-checking testbench of mmm_mbrfa at its default width.
// Loads random carry-save pairs, then steps with random bypass decisions
// and checks that the two output bits are always bits p and p+1 of
// A = a1 + a2, where p advances by one per step, or by two on bypass.
module tb_mmm_mbrfa;
  localparam int AW = 1026;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, step = 1'b0, bypass = 1'b0;
  logic [AW-1:0] a1, a2;
  logic a_n1, a_n2;
  int checks = 0, failures = 0, n_bypass = 0, cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  mmm_mbrfa dut (.*);

  function automatic logic [AW-1:0] rnd();
    logic [AW-1:0] v;
    for (int j = 0; j < AW; j += 32) v = (v << 32) | AW'($urandom);
    return v;
  endfunction

  initial begin
    logic [AW+2:0] A;
    int p;
    a1 = '0; a2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 8; t++) begin
      a1 = rnd() >> 2; a2 = rnd() >> 2;
      if (t == 0) a2 = '0;
      A = (AW+3)'(a1) + (AW+3)'(a2);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      p = 0;
      while (p < AW + 1) begin
        step = 1'($urandom % 4 != 0);
        bypass = step && ($urandom % 2 == 1);
        checks += 2;
        if (a_n1 != A[p] || a_n2 != A[p+1]) begin
          failures++;
          $display("load %0d bit %0d: got %b%b expected %b%b", t, p, a_n2, a_n1, A[p+1], A[p]);
        end
        if (bypass) n_bypass++;
        @(negedge clk);
        if (step) p += bypass ? 2 : 1;
      end
    end
    step = 1'b0;
    checks++;
    if (n_bypass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
