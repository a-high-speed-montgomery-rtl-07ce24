// Randomised testbench of mmm_rsa at a small size (K = 16, 16-bit
// exponents): thousands of exponentiations with random odd moduli
// (including the smallest ones), messages and exponents, each compared with
// square-and-multiply on plain integers. At this size the loop's rare
// cases, such as a result equal to N before the final reduction, occur.
module tb_mmm_rsa_small;
  localparam int K  = 16;
  localparam int EW = 16;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, ready, done;
  logic [K-1:0]  msg, n, r2, result;
  logic [EW-1:0] expo;
  int checks = 0, failures = 0, n_reduce = 0;

  always #5 clk = ~clk;

  mmm_rsa #(.K(K), .EW(EW)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .ready(ready),
    .msg(msg), .expo(expo), .n(n), .r2(r2), .done(done), .result(result)
  );

  always @(posedge clk)
    if (dut.state == mmm_pkg::XS_ADD && dut.x_sum >= 19'(dut.n_q)) n_reduce++;

  function automatic longint unsigned ref_exp(longint unsigned m, longint unsigned e,
                                              longint unsigned nn);
    longint unsigned r = 1 % nn;
    for (int j = EW - 1; j >= 0; j--) begin
      r = (r * r) % nn;
      if (e[j]) r = (r * m) % nn;
    end
    return r;
  endfunction

  initial begin
    longint unsigned nn, m, e, rr, expect_r;
    msg = '0; n = '0; r2 = '0; expo = '0;
    void'($urandom(5));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      nn = longint'($urandom % 65536) | 1;
      if (t % 4 == 0) nn = longint'($urandom % 64) | 1;
      if (nn < 3) nn = 3;
      m = longint'($urandom) % nn;
      if (t % 7 == 0) m = 0;
      if (t % 11 == 0) m = nn - 1;
      e = longint'($urandom % 65536);
      if (t % 5 == 0) e = longint'($urandom % 8);
      rr = (64'd1 << (2 * K + 4)) % nn;
      expect_r = ref_exp(m, e, nn);
      @(negedge clk);
      msg = K'(m); n = K'(nn); r2 = K'(rr); expo = EW'(e);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      checks++;
      if (longint'(result) != expect_r) begin
        failures++;
        $display("N=%0d M=%0d E=%0d: got %0d expected %0d", nn, m, e, result, expect_r);
      end
    end
    $display("final reductions by N: %0d", n_reduce);
    checks++;
    if (n_reduce == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
