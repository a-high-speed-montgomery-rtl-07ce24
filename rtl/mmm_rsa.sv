// RSA modular exponentiation on the MMM42 multiplier: result = M^E mod N.
//
// The multiplier works in the Montgomery domain with R = 2^(K+2) and keeps
// its results in carry-save form below 2N, so a product is used directly as
// the next operand without a carry-propagate addition or a subtraction of
// N. Only the final result is converted once. The sequence is the left-to-
// right binary method:
//   M' = MMM(M, R^2 mod N)                     (M' = M*R mod N)
//   skip the leading zeros of E; X = M' for its leading one
//   for each further bit of E, MSB first:
//     X = MMM(X, X); if the bit is one, X = MMM(X, M')
//   X = MMM(X, 1)                              (back to X*R^-1: value <= N)
//   result = X1 + X2, minus N if that is >= N
// X is never copied: it is the multiplier's own output register pair
// (RSS/RSC), which holds its value between multiplications. M' is kept in a
// register pair of its own.
//
// The published architecture targets RSA exponentiation and
// states that its outputs feed the next multiplication directly; the
// sequencing, the leading-zero skip, the final conversion and the
// interface are this design's own.
//
// Interface: pulse start while ready; msg, expo, n and r2 are sampled then.
// r2 must be R^2 mod N = 2^(2K+4) mod N, precomputed by the host; N must be
// odd and greater than 1; msg below N. done pulses for one cycle with the
// result valid until the next start. Time: one MMM per squaring and per set
// exponent bit after the leading one, plus two, each taking at most K+5
// cycles plus two control cycles; one cycle per leading zero skipped; one
// cycle for the final addition. E = 0 returns 1 without multiplying.
module mmm_rsa
  import mmm_pkg::*;
#(
  parameter int unsigned K  = 1024,  // modulus width
  parameter int unsigned EW = 1024   // exponent width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          ready,
  input  logic [K-1:0]  msg,
  input  logic [EW-1:0] expo,
  input  logic [K-1:0]  n,
  input  logic [K-1:0]  r2,
  output logic          done,
  output logic [K-1:0]  result
);

  localparam int unsigned BW = $clog2(EW + 1);

  exp_state_e     state;
  logic [EW-1:0]  e_q;
  logic [BW-1:0]  bits_left;
  logic [K-1:0]   n_q, msg_q, r2_q;
  logic [K+1:0]   m1_q, m2_q;
  logic           issued;

  logic           m_start, m_ready, m_done;
  logic [K+1:0]   m_a1, m_a2, m_b1, m_b2, m_s1, m_s2;
  logic [K+2:0]   x_sum, x_red;
  logic           mult_state;

  mmm42_mult #(.K(K)) u_mult (
    .clk   (clk),
    .rst_n (rst_n),
    .start (m_start),
    .ready (m_ready),
    .a1    (m_a1),
    .a2    (m_a2),
    .b1    (m_b1),
    .b2    (m_b2),
    .n     (n_q),
    .done  (m_done),
    .s1    (m_s1),
    .s2    (m_s2)
  );

  assign mult_state = (state == XS_TOMONT) || (state == XS_SQR) ||
                      (state == XS_MUL) || (state == XS_FROM);
  assign m_start    = mult_state && !issued && m_ready;

  // Operand selection for the multiplier.
  always_comb begin
    m_a1 = m_s1;
    m_a2 = m_s2;
    m_b1 = m_s1;
    m_b2 = m_s2;
    unique case (state)
      XS_TOMONT: begin
        m_a1 = (K+2)'(msg_q); m_a2 = '0;
        m_b1 = (K+2)'(r2_q);  m_b2 = '0;
      end
      XS_MUL: begin
        m_b1 = m1_q; m_b2 = m2_q;
      end
      XS_FROM: begin
        m_b1 = (K+2)'(1); m_b2 = '0;
      end
      default: ;
    endcase
  end

  // Final conversion: X1 + X2 is at most N; N itself means 0.
  assign x_sum = (K+3)'(m_s1) + (K+3)'(m_s2);
  assign x_red = (x_sum >= (K+3)'(n_q)) ? x_sum - (K+3)'(n_q) : x_sum;

  assign ready = (state == XS_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= XS_IDLE;
      e_q       <= '0;
      bits_left <= '0;
      n_q       <= '0;
      msg_q     <= '0;
      r2_q      <= '0;
      m1_q      <= '0;
      m2_q      <= '0;
      issued    <= 1'b0;
      done      <= 1'b0;
      result    <= '0;
    end else begin
      done <= 1'b0;
      if (m_start) issued <= 1'b1;
      if (m_done)  issued <= 1'b0;
      unique case (state)
        XS_IDLE: begin
          if (start) begin
            e_q       <= expo;
            bits_left <= BW'(EW);
            n_q       <= n;
            msg_q     <= msg;
            r2_q      <= r2;
            state     <= XS_TOMONT;
          end
        end
        XS_TOMONT: begin
          if (m_done) begin
            m1_q  <= m_s1;
            m2_q  <= m_s2;
            state <= XS_SCAN;
          end
        end
        XS_SCAN: begin
          if (bits_left == '0) begin
            // E = 0
            result <= (K)'(1);
            done   <= 1'b1;
            state  <= XS_IDLE;
          end else begin
            // The leading one takes X = M', which the multiplier holds.
            if (e_q[EW-1]) state <= XS_LOOP;
            e_q       <= e_q << 1;
            bits_left <= bits_left - BW'(1);
          end
        end
        XS_LOOP: begin
          state <= (bits_left == '0) ? XS_FROM : XS_SQR;
        end
        XS_SQR: begin
          if (m_done) begin
            if (e_q[EW-1]) begin
              state <= XS_MUL;
            end else begin
              e_q       <= e_q << 1;
              bits_left <= bits_left - BW'(1);
              state     <= XS_LOOP;
            end
          end
        end
        XS_MUL: begin
          if (m_done) begin
            e_q       <= e_q << 1;
            bits_left <= bits_left - BW'(1);
            state     <= XS_LOOP;
          end
        end
        XS_FROM: begin
          if (m_done) state <= XS_ADD;
        end
        XS_ADD: begin
          result <= x_red[K-1:0];
          done   <= 1'b1;
          state  <= XS_IDLE;
        end
        default: state <= XS_IDLE;
      endcase
    end
  end

endmodule
