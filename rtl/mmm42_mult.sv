// MMM42 Montgomery modular multiplier with superfluous-iteration bypass.
//
// Computes S = A * B * 2^-(K+2) mod N, with A, B and S in carry-save form
// (two words each) and all of them in [0, 2N), so that a result can be fed
// straight back as an operand during modular exponentiation. N must be odd
// and below 2^K.
//
// How it works. The multiplicand is kept doubled, B' = 2B, so that every
// quotient bit is simply the parity of the running sum. One clock cycle is
// one iteration of radix-2 Montgomery multiplication: the four-to-two adder
// (mmm_rca42) adds the state and an operand pair selected by the stored
// code {A~, q~} (0, N, B', or D = B' + N). Because B' is doubled, the loop
// runs K+3 real iterations i = 0 .. K+2 (A is extended by two zero bits),
// preceded by a dummy iteration i = -1 that only primes the look-ahead. The
// look-ahead unit (mmm_lu) sees, during iteration i, whether iteration i+1
// would add nothing (A(i+1) = 0 and q(i+1) = 0); if so that iteration is
// skipped: the bypass flag is stored in a flip-flop, the next cycle divides
// the state by four instead of two through M3/M4, and the MBRFA advances A
// by two bits. Each skipped iteration saves one clock cycle and one
// register write of the wide state.
//
// Before the loop one extra cycle uses the same adder to form D = B' + N
// (state preset to N, operands B') into RD1/RD2. B' itself is the input
// words shifted left by one, written to RB1/RB2 by wiring.
//
// RB1, RB2, RN (loaded on start) and RD1, RD2 (loaded in the pre-compute
// cycle) are clocked through clock gates and hold otherwise.
//
// Interface and timing: pulse start while ready is high; operands are
// sampled on that edge. After 1 pre-compute cycle and K+4-b iteration
// cycles, where b is the number of bypasses, done pulses for one cycle and
// s1/s2 hold the result until the next start. With no bypass the latency
// from the start edge to done is K+5 cycles.
//
// Own choices (not given by the published architecture): the datapath is K+4 bits wide;
// bypass is not allowed in the last two iterations, so the loop always ends
// with a plain halving; asynchronous active-low reset of the control and
// state registers; the start/ready/done handshake.
module mmm42_mult
  import mmm_pkg::*;
#(
  parameter int unsigned K = 1024  // modulus width in bits
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         ready,
  input  logic [K+1:0] a1,
  input  logic [K+1:0] a2,
  input  logic [K+1:0] b1,
  input  logic [K+1:0] b2,
  input  logic [K-1:0] n,
  output logic         done,
  output logic [K+1:0] s1,
  output logic [K+1:0] s2
);

  localparam int unsigned W    = K + 4;
  localparam int unsigned AW   = K + 2;
  localparam int unsigned CW   = $clog2(K + 5);
  localparam logic [CW-1:0] LAST_CNT  = CW'(K + 3);  // count = i + 1, last i = K+2
  localparam logic [CW-1:0] BYP_LIMIT = CW'(K + 1);  // bypass allowed for i <= K

  mult_state_e state;
  logic [CW-1:0] cnt;
  logic [W-1:0]  rss, rsc;
  logic [W-1:0]  rb1, rb2, rd1, rd2, rn;
  opsel_e        sel_q;
  logic          byp_q;

  logic [W-1:0]  t_s, t_c;
  logic [2:0]    s1p_lo, c1p_lo, y_lo;
  logic          a_n1, a_n2;
  logic          q_next, a_next, bypass, bypass_en;
  logic          accept, en_b, en_d, gclk_b, gclk_d;

  assign ready     = (state == MS_IDLE);
  assign accept    = ready & start;
  assign en_b      = accept;
  assign en_d      = (state == MS_PRE);
  assign bypass_en = (state == MS_ITER) && (cnt <= BYP_LIMIT);

  mmm_rca42 #(.W(W)) u_rca42 (
    .rss    (rss),
    .rsc    (rsc),
    .shift2 (byp_q),
    .sel    (sel_q),
    .rb1    (rb1),
    .rb2    (rb2),
    .rd1    (rd1),
    .rd2    (rd2),
    .rn     (rn),
    .t_s    (t_s),
    .t_c    (t_c),
    .s1p_lo (s1p_lo),
    .c1p_lo (c1p_lo),
    .y_lo   (y_lo)
  );

  mmm_mbrfa #(.AW(AW)) u_mbrfa (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (accept),
    .a1     (a1),
    .a2     (a2),
    .step   (state == MS_ITER),
    .bypass (bypass),
    .a_n1   (a_n1),
    .a_n2   (a_n2)
  );

  mmm_lu u_lu (
    .s1p_lo    (s1p_lo),
    .c1p_lo    (c1p_lo),
    .y_lo      (y_lo),
    .a_n1      (a_n1),
    .a_n2      (a_n2),
    .bypass_en (bypass_en),
    .q_next    (q_next),
    .a_next    (a_next),
    .bypass    (bypass)
  );

  mmm_clock_gate u_cg_b (.clk(clk), .en(en_b), .gclk(gclk_b));
  mmm_clock_gate u_cg_d (.clk(clk), .en(en_d), .gclk(gclk_d));

  // Operand registers on gated clocks: written only when their clock runs.
  always_ff @(posedge gclk_b) begin
    rb1 <= W'({b1, 1'b0});
    rb2 <= W'({b2, 1'b0});
    rn  <= W'(n);
  end

  always_ff @(posedge gclk_d) begin
    rd1 <= t_s;
    rd2 <= t_c;
  end

  // Controller, state registers RSS/RSC and the FFs of A~, q~, bypass.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= MS_IDLE;
      cnt   <= '0;
      rss   <= '0;
      rsc   <= '0;
      sel_q <= SEL_ZERO;
      byp_q <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        MS_IDLE: begin
          if (start) begin
            // Preset for D = N + B': state = N (2N halved by M3/M4).
            rss   <= W'({n, 1'b0});
            rsc   <= '0;
            sel_q <= SEL_B;
            byp_q <= 1'b0;
            state <= MS_PRE;
          end
        end
        MS_PRE: begin
          // Initial values of iteration i = -1.
          rss   <= '0;
          rsc   <= '0;
          sel_q <= SEL_ZERO;
          byp_q <= 1'b0;
          cnt   <= '0;
          state <= MS_ITER;
        end
        MS_ITER: begin
          rss   <= t_s;
          rsc   <= t_c;
          sel_q <= opsel_e'({a_next, q_next});
          byp_q <= bypass;
          if (cnt == LAST_CNT) begin
            state <= MS_IDLE;
            done  <= 1'b1;
          end else begin
            cnt <= cnt + CW'(1) + CW'(bypass);
          end
        end
        default: state <= MS_IDLE;
      endcase
    end
  end

  // Result: the stored sum halved. Both words are even, so this is exact.
  assign s1 = rss[AW:1];
  assign s2 = rsc[AW:1];

  // Every iteration produces an even sum; a bypass needs an even half.
  a_even : assert property (@(posedge clk) disable iff (!rst_n)
    (state == MS_ITER) |-> (t_s[0] == 1'b0));
  a_bypass_even : assert property (@(posedge clk) disable iff (!rst_n)
    bypass |-> (t_s[1] == 1'b0));
  // The carry word of the state always ends in two zeros (see mmm_rca42).
  a_carry_low : assert property (@(posedge clk) disable iff (!rst_n)
    (state == MS_ITER) |-> (t_c[1:0] == 2'b00));

endmodule
