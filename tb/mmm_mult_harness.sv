// Test harness for mmm42_mult: drives one multiplier instance of width K
// with NTEST multiplications and checks each result three ways:
//   * exactly: s1 + s2 equals the integer that radix-2 Montgomery
//     multiplication with a doubled multiplicand and skipped zero iterations
//     produces (computed here with plain wide arithmetic);
//   * modularly: (s1 + s2) * 2^(K+2) mod N equals A * B mod N, and
//     s1 + s2 < 2N;
//   * in time: the start-to-done latency is 1 + the number of iterations
//     actually run.
// Operands are random values below 2N split at random into two carry-save
// words; some tests reuse the previous result as the next multiplier, as
// exponentiation does, and a few use the corner values 0 and 2N-1.
// It also counts how often the bypass, each operand select code and the
// divide-by-four shift of M3/M4 occurred.
module mmm_mult_harness #(
  parameter int K     = 16,
  parameter int NTEST = 100,
  parameter int SEED  = 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_bypass,
  output int   n_shift2,    // cycles that divided the state by four
  output int   n_sel [4],
  output int   lat_sum,  // start-to-done cycles summed over all products
  output logic finished
);
  import mmm_pkg::*;

  localparam int XW = 2 * K + 12;
  typedef logic [XW-1:0] big_t;

  logic         start, ready, done;
  logic [K+1:0] a1, a2, b1, b2, s1, s2;
  logic [K-1:0] n;

  mmm42_mult #(.K(K)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .ready(ready),
    .a1(a1), .a2(a2), .b1(b1), .b2(b2), .n(n),
    .done(done), .s1(s1), .s2(s2)
  );

  function automatic big_t rnd();
    big_t v;
    for (int j = 0; j < XW; j += 32) v = (v << 32) | big_t'($urandom);
    return v;
  endfunction

  // Reference: same iteration sequence on plain integers.
  function automatic big_t ref_mont(big_t a, big_t b, big_t nn, output int iters);
    big_t s;
    int i;
    s = '0;
    i = -1;
    iters = 0;
    forever begin
      iters++;
      if (i >= 0) s = (s + (a[i] ? (b << 1) : big_t'(0)) + (s[0] ? nn : big_t'(0))) >> 1;
      if (i == K + 2) break;
      if (i <= K && a[i+1] == 1'b0 && s[0] == 1'b0) begin
        s = s >> 1;
        i += 2;
      end else begin
        i += 1;
      end
    end
    return s;
  endfunction

  // Count mechanisms every iteration cycle.
  always @(posedge clk) begin
    if (rst_n && dut.state == MS_ITER) begin
      n_sel[dut.sel_q] = n_sel[dut.sel_q] + 1;
      if (dut.bypass) n_bypass++;
      if (dut.byp_q) n_shift2++;
    end
  end

  initial begin
    big_t A, B, NN, S, Sref, R, prev;
    int   iters, lat;
    void'($urandom(SEED));
    checks = 0; failures = 0; lat_sum = 0; n_bypass = 0; n_shift2 = 0; finished = 1'b0;
    for (int j = 0; j < 4; j++) n_sel[j] = 0;
    start = 1'b0;
    a1 = '0; a2 = '0; b1 = '0; b2 = '0; n = '0;
    prev = '0;
    R = big_t'(1) << (K + 2);
    @(posedge rst_n);
    for (int t = 0; t < NTEST; t++) begin
      NN = rnd() & ((big_t'(1) << K) - 1);
      NN[0] = 1'b1;
      if (t % 2 == 1) NN[K-1] = 1'b1;
      if (NN == 1) NN = 3;
      A = rnd() % (NN << 1);
      B = rnd() % (NN << 1);
      if (t == 0) A = '0;
      if (t == 1) begin A = (NN << 1) - 1; B = (NN << 1) - 1; end
      if (t == 2) B = '0;
      if (t % 3 == 2 && t > 3 && prev < (NN << 1)) A = prev;
      n  = NN[K-1:0];
      a1 = (K+2)'(rnd() % (A + 1));
      a2 = (K+2)'(A - big_t'(a1));
      b1 = (K+2)'(rnd() % (B + 1));
      b2 = (K+2)'(B - big_t'(b1));
      Sref = ref_mont(A, B, NN, iters);
      @(negedge clk);
      while (!ready) @(negedge clk);
      start = 1'b1;
      @(posedge clk);
      @(negedge clk);
      start = 1'b0;
      lat = 0;
      while (!done && lat < 4 * K + 20) begin
        @(negedge clk);
        lat++;
      end
      lat_sum += lat;
      S = big_t'(s1) + big_t'(s2);
      prev = S;
      checks += 4;
      if (S != Sref) begin
        failures++;
        $display("K=%0d test %0d: result %h, expected %h", K, t, S, Sref);
      end
      if ((S * R) % NN != (A * B) % NN) begin
        failures++;
        $display("K=%0d test %0d: result not congruent to A*B/R mod N", K, t);
      end
      if (S >= (NN << 1)) begin
        failures++;
        $display("K=%0d test %0d: result not below 2N", K, t);
      end
      if (lat != iters + 1) begin
        failures++;
        $display("K=%0d test %0d: latency %0d, expected %0d", K, t, lat, iters + 1);
      end
    end
    finished = 1'b1;
  end

endmodule
