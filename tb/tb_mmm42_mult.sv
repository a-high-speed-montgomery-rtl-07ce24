// Self-checking testbench of mmm42_mult.
// One instance at the default width K = 1024 runs a few dozen products; a
// second at K = 16 runs thousands, which reaches the rare cases (bypass
// right before the end of the loop, corner operands). The mean latency at
// K = 1024 must show the saving of the bypass. See
// mmm_mult_harness for what is checked. Every mechanism must occur.
module tb_mmm42_mult;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks, failures;
  int lat_big, lat_sml;
  int c_big, f_big, byp_big, sh2_big, sel_big [4];
  int c_sml, f_sml, byp_sml, sh2_sml, sel_sml [4];
  logic fin_big, fin_sml;

  always #5 clk = ~clk;

  mmm_mult_harness #(.K(1024), .NTEST(24), .SEED(7)) h_big (
    .clk(clk), .rst_n(rst_n), .checks(c_big), .failures(f_big),
    .n_bypass(byp_big), .n_shift2(sh2_big), .n_sel(sel_big), .lat_sum(lat_big), .finished(fin_big));

  mmm_mult_harness #(.K(16), .NTEST(4000), .SEED(3)) h_sml (
    .clk(clk), .rst_n(rst_n), .checks(c_sml), .failures(f_sml),
    .n_bypass(byp_sml), .n_shift2(sh2_sml), .n_sel(sel_sml), .lat_sum(lat_sml), .finished(fin_sml));

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
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fin_big && fin_sml);
    checks = c_big + c_sml;
    failures = f_big + f_sml;
    // Throughput: with random operands roughly a fifth of the K+4
    // iterations are bypassed, so the mean latency must be well below K+5.
    checks++;
    $display("K=1024 mean latency %0d.%0d cycles (K+5 = 1029 without bypass)",
             lat_big / 24, (lat_big % 24) * 10 / 24);
    if (lat_big > 24 * 900) failures++;
    need("bypass", byp_big + byp_sml);
    need("divide-by-four shift", sh2_big + sh2_sml);
    need("select 0", sel_big[0] + sel_sml[0]);
    need("select N", sel_big[1] + sel_sml[1]);
    need("select B", sel_big[2] + sel_sml[2]);
    need("select D", sel_big[3] + sel_sml[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c_big + c_sml, f_big + f_sml + 1);
    $finish;
  end
endmodule
