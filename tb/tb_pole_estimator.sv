// tb_pole_estimator: checks the counter-to-pole conversion against the two
// counter formulas evaluated in floating point:
//   Step 1: count = (1+OFFSET_COMP) * N * Q * (1 - p),  Q = (L-2)/L
//   Step 2: count = (1+OFFSET_COMP) * N * (1 - p) / ln((3L-5)/(L-5))
// (the counter holds half the +1/-1 difference sum). The estimate must be
// within 2 LSB of 1 - count/scale, clamped to [0, 1]. Run with the default
// sizes and with a small single-pass configuration.
module tb_pole_estimator;
  import sd_cal_pkg::*;

  logic step2;
  logic signed [17:0] count_a;
  logic signed [15:0] count_b;
  coef_t p_a, p_b;
  int checks = 0, failures = 0;

  pole_estimator dut_a (.step2, .count(count_a), .p_est(p_a));
  pole_estimator #(.N(4096), .L(8), .OFFSET_COMP(1'b0), .CNT_W(16))
    dut_b (.step2, .count(count_b), .p_est(p_b));

  function automatic real expect_p(int cnt, int n, int len, int passes, bit s2);
    real scale, e;
    if (!s2) scale = passes * n * real'(len - 2) / len;
    else     scale = passes * n / $ln(real'(3 * len - 5) / real'(len - 5));
    e = cnt / scale;
    if (e < 0.0) e = 0.0;
    if (e > 1.0) e = 1.0;
    return 1.0 - e;
  endfunction

  task automatic check(coef_t got, real exp, string what);
    real got_r = real'(got) / real'(COEF_ONE);
    checks++;
    if (got_r - exp > 2.0 / COEF_ONE || exp - got_r > 2.0 / COEF_ONE) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got_r, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ca, cb;
    for (int i = 0; i < 400; i++) begin
      step2 = (i % 2) == 1;
      if (i < 4)       ca = (i < 2) ? 0 : -37;          // p = 1 (clamped)
      else if (i < 6)  ca = 100000;                      // p = 0 (clamped)
      else if (i < 200) ca = $urandom_range(0, 1500);    // 60..40 dB amplifiers
      else             ca = $urandom_range(0, 40000);
      cb = $urandom_range(0, 6000) - 200;
      count_a = 18'(ca);
      count_b = 16'(cb);
      #1;
      check(p_a, expect_p(ca, 33000, 6, 2, step2), $sformatf("default step2=%0b count=%0d", step2, ca));
      check(p_b, expect_p(cb, 4096, 8, 1, step2), $sformatf("small step2=%0b count=%0d", step2, cb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
