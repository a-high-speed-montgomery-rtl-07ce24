// Self-checking testbench of mmm_rca42 at its default width.
// Random state words, shift flag and operands for all four select codes;
// the sum of the two output words must equal the shifted state plus the
// selected operands, the carry word must end in a zero, and the low three
// bits handed to the look-ahead unit must add up to the low bits of the sum.
module tb_mmm_rca42;
  import mmm_pkg::*;
  localparam int W = 1028;
  typedef logic [W+1:0] wide_t;

  logic [W-1:0] rss, rsc, rb1, rb2, rd1, rd2, rn, t_s, t_c;
  logic [2:0]   s1p_lo, c1p_lo, y_lo;
  logic         shift2;
  opsel_e       sel;
  int checks = 0, failures = 0;
  int n_shift2 = 0;

  mmm_rca42 dut (.*);

  function automatic logic [W-1:0] rnd(input int top);
    logic [W-1:0] v;
    for (int j = 0; j < W; j += 32) v = (v << 32) | W'($urandom);
    return v & ((W'(1) << top) - 1);  // keep headroom so the sum fits
  endfunction

  initial begin
    wide_t expect_sum, got;
    logic [W-1:0] w_ref, y_ref;
    for (int t = 0; t < 2000; t++) begin
      rss = rnd(W - 3); rsc = rnd(W - 3);
      rb1 = rnd(W - 3); rb2 = rnd(W - 3);
      rd1 = rnd(W - 3); rd2 = rnd(W - 3); rn = rnd(W - 3);
      shift2 = 1'($urandom);
      sel = opsel_e'($urandom % 4);
      case (sel)
        SEL_ZERO: begin w_ref = '0;  y_ref = '0;  end
        SEL_N:    begin w_ref = rn;  y_ref = '0;  end
        SEL_B:    begin w_ref = rb1; y_ref = rb2; end
        default:  begin w_ref = rd1; y_ref = rd2; end
      endcase
      #1;
      if (shift2) n_shift2++;
      expect_sum = wide_t'(rss >> (shift2 ? 2 : 1)) + wide_t'(rsc >> (shift2 ? 2 : 1))
                 + wide_t'(w_ref) + wide_t'(y_ref);
      got = wide_t'(t_s) + wide_t'(t_c);
      checks += 4;
      if (got != expect_sum) begin
        failures++;
        $display("test %0d sel %0d shift2 %0b: sum wrong", t, sel, shift2);
      end
      if (t_c[0] != 1'b0) failures++;
      if (y_lo != y_ref[2:0]) failures++;
      if (3'(s1p_lo + c1p_lo + y_lo) != expect_sum[2:0]) failures++;
    end
    checks++;
    if (n_shift2 == 0) failures++;
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
