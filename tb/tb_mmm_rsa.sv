// End-to-end testbench of mmm_rsa at its default size (K = 1024, 1024-bit
// exponent field). Runs exponentiations with E = 65537, 3, 1, 0, a random
// 40-bit exponent, M = 0 and M = N-1, against a reference computed with
// plain wide multiplication and remainder. Also checks per exponentiation
// that the number of squarings and multiplications is the one the binary
// method needs and that the cycle count stays within one K+5 cycle
// multiplication each, and over the whole run that every mechanism
// occurred: bypass, divide-by-four shift, each operand select code, the
// gated-clock loads (exactly one pulse per multiplication for each gate),
// squarings, multiplications by M' and skipped leading zeros.
module tb_mmm_rsa;
  import mmm_pkg::*;
  localparam int K  = 1024;
  localparam int EW = 1024;
  localparam int XW = 2 * K + 8;
  typedef logic [XW-1:0] big_t;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, ready, done;
  logic [K-1:0]  msg, n, r2, result;
  logic [EW-1:0] expo;
  int checks = 0, failures = 0;
  int n_bypass = 0, n_shift2 = 0, n_sel [4], n_gb = 0, n_gd = 0;
  int n_sqr = 0, n_mul = 0, n_skip = 0, n_mults = 0;

  always #5 clk = ~clk;

  mmm_rsa dut (
    .clk(clk), .rst_n(rst_n), .start(start), .ready(ready),
    .msg(msg), .expo(expo), .n(n), .r2(r2), .done(done), .result(result)
  );

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_mult.state == MS_ITER) begin
        n_sel[dut.u_mult.sel_q] = n_sel[dut.u_mult.sel_q] + 1;
        if (dut.u_mult.bypass) n_bypass++;
        if (dut.u_mult.byp_q) n_shift2++;
      end
      if (dut.m_start) begin
        n_mults++;
        if (dut.state == XS_SQR) n_sqr++;
        if (dut.state == XS_MUL) n_mul++;
      end
      if (dut.state == XS_SCAN && !dut.e_q[EW-1] && dut.bits_left != 0) n_skip++;
    end
  end
  always @(posedge dut.u_mult.gclk_b) n_gb++;
  always @(posedge dut.u_mult.gclk_d) n_gd++;

  function automatic big_t rnd();
    big_t v;
    for (int j = 0; j < XW; j += 32) v = (v << 32) | big_t'($urandom);
    return v;
  endfunction

  function automatic big_t ref_exp(big_t m, logic [EW-1:0] e, big_t nn);
    big_t r = big_t'(1) % nn;
    for (int j = EW - 1; j >= 0; j--) begin
      r = (r * r) % nn;
      if (e[j]) r = (r * m) % nn;
    end
    return r;
  endfunction

  task automatic run(input big_t nn, input big_t m, input logic [EW-1:0] e);
    big_t rr, expect_r;
    int cyc, sq0, mu0, mults0, top, pop, mults_exp;
    rr = (big_t'(1) << (2 * K + 4)) % nn;
    expect_r = ref_exp(m, e, nn);
    top = -1; pop = 0;
    for (int j = 0; j < EW; j++) if (e[j]) begin top = j; pop++; end
    mults_exp = (top < 0) ? 1 : top + pop + 1;  // sqr + mul + two conversions
    sq0 = n_sqr; mu0 = n_mul; mults0 = n_mults;
    @(negedge clk);
    msg = m[K-1:0]; n = nn[K-1:0]; r2 = rr[K-1:0]; expo = e;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks += 4;
    if (big_t'(result) != expect_r) begin
      failures++;
      $display("M^E mod N wrong: got %h expected %h", result, expect_r);
    end
    if (top >= 0 && (n_sqr - sq0 != top || n_mul - mu0 != pop - 1)) begin
      failures++;
      $display("squarings %0d multiplications %0d, expected %0d %0d",
               n_sqr - sq0, n_mul - mu0, top, pop - 1);
    end
    if (n_mults - mults0 != mults_exp) begin
      failures++;
      $display("multiplications %0d, expected %0d", n_mults - mults0, mults_exp);
    end
    if (cyc > mults_exp * (K + 5 + 2) + EW + 4) begin
      failures++;
      $display("too slow: %0d cycles for %0d multiplications", cyc, mults_exp);
    end
    $display("E with %0d bits: %0d multiplications, %0d cycles", top + 1, mults_exp, cyc);
  endtask

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("mechanism never occurred: %s", what);
    end else begin
      $display("%s: %0d", what, count);
    end
  endtask

  initial begin
    big_t nn, m;
    for (int j = 0; j < 4; j++) n_sel[j] = 0;
    msg = '0; n = '0; r2 = '0; expo = '0;
    void'($urandom(11));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    nn = rnd() & ((big_t'(1) << K) - 1);
    nn[0] = 1'b1; nn[K-1] = 1'b1;
    m = rnd() % nn;
    run(nn, m, EW'(65537));
    run(nn, m, EW'(3));
    run(nn, m, EW'(1));
    run(nn, m, EW'(0));
    run(nn, big_t'(0), EW'(5));
    run(nn, nn - 1, EW'(2));
    nn = rnd() & ((big_t'(1) << (K - 3)) - 1);
    nn[0] = 1'b1;
    m = rnd() % nn;
    run(nn, m, EW'({$urandom, $urandom} & 64'hFF_FFFF_FFFF));
    checks++;
    if (n_gb != n_mults || n_gd != n_mults) begin
      failures++;
      $display("gated clock pulses %0d/%0d for %0d multiplications", n_gb, n_gd, n_mults);
    end
    need("bypass", n_bypass);
    need("divide-by-four shift", n_shift2);
    need("select 0", n_sel[0]);
    need("select N", n_sel[1]);
    need("select B", n_sel[2]);
    need("select D", n_sel[3]);
    need("gated load of RB1/RB2/RN", n_gb);
    need("gated load of RD1/RD2", n_gd);
    need("squaring", n_sqr);
    need("multiplication by M'", n_mul);
    need("leading zero skipped", n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
