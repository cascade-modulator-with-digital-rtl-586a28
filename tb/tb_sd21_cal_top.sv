// tb_sd21_cal_top: end-to-end test of the calibrated 2-1 cascade modulator,
// with the digital block at its default sizes (N = 33000, L = 6) connected to
// a behavioural model of the analog modulator whose first two integrators
// leak (poles 0.97 and 0.98, amplifier gains of roughly 30 to 34 dB, the low
// end of the range the correction targets) and which has an input-referred
// offset of 0.1 % of full scale.
//
// 1. Reset: the filter starts with the ideal poles.
// 2. Foreground calibration: checks the busy time, that Step 1, Step 2, the
//    opposite-sequence passes and the feedback delay all occur (and that the
//    DAC bit is the previous comparator bit exactly when the delay is on),
//    and that the estimated pole errors 1 - p are within 15 % of the model's.
// 3. Conversion of a 70 %-of-full-scale sine: the output is decimated by 128
//    with a fourth-order sinc (CIC) filter and 1024 decimated samples are
//    transformed with a DFT, once with the corrected filter and once with the
//    ideal (uncorrected) one. The corrected SNR must exceed the uncorrected one
//    by at least 12 dB (2 bits).
// 4. Direct load of the coefficients.
// Counts of every mechanism are printed; one that never occurs is a failure.
module tb_sd21_cal_top;
  import sd_cal_pkg::*;

  localparam real PM1 = 0.97, PM2 = 0.98, PM3 = 0.99;
  localparam int  DEC = 128;
  localparam int  NFFT = 1024;
  localparam int  KSIG = 3;       // signal bin
  localparam int  N = 33000, SETTLE = 256;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  real  x = 0.0;
  test_mode_e mod_mode;
  logic y1, y2, test_bit, dac1_bit;
  logic cal_start = 1'b0, corr_en = 1'b1, p_wr = 1'b0;
  coef_t p1_wdata = '0, p2_wdata = '0, p1, p2;
  logic cal_busy, cal_done;
  logic signed [17:0] cnt1, cnt2;
  logic signed [COEF_F+4:0] y_out;
  int checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  sd21_modulator_model #(.P1(PM1), .P2(PM2), .P3(PM3), .OFFSET(0.001)) u_mod (
    .clk, .rst_n, .x, .mode(mod_mode), .test_bit, .dac1_bit, .y1, .y2
  );

  sd21_cal_top dut (
    .clk, .rst_n, .y1, .y2, .mod_mode, .test_bit, .dac1_bit,
    .cal_start, .corr_en, .p_wr, .p1_wdata, .p2_wdata,
    .cal_busy, .cal_done, .p1, .p2, .cnt1, .cnt2, .y_out
  );

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---- mechanism counters and the feedback-delay check ----
  int n_step1 = 0, n_step2 = 0, n_normal = 0, n_opposite = 0, n_count = 0;
  int n_delay_bad = 0, n_corr = 0, n_uncorr = 0, n_load = 0;
  logic y1_prev = 1'b0;
  always @(negedge clk) if (rst_n) begin
    unique case (mod_mode)
      MODE_STEP1: n_step1++;
      MODE_STEP2: n_step2++;
      default:    n_normal++;
    endcase
    if (dut.u_ctrl.cnt_sub && dut.u_ctrl.cnt_en) n_opposite++;
    if (dut.u_ctrl.cnt_en) n_count++;
    if (dac1_bit !== ((mod_mode == MODE_STEP2) ? y1_prev : y1)) n_delay_bad++;
  end
  always @(posedge clk) y1_prev <= y1;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- sine conversion with CIC decimation and DFT ----
  real dec_out[NFFT];

  task automatic convert(output real snr_db);
    longint i1, i2, i3, i4, c1d, c2d, c3d, c4d, c1, c2, c3, c4;
    longint t;
    real ps, pn, re, im, w;
    int m;
    i1 = 0; i2 = 0; i3 = 0; i4 = 0; c1d = 0; c2d = 0; c3d = 0; c4d = 0;
    m = 0;
    // 8 decimated samples to flush the filter, then NFFT kept
    for (int n = 0; n < (NFFT + 8) * DEC; n++) begin
      @(negedge clk);
      x = 0.7 * $sin(2.0 * 3.14159265358979 * KSIG * n / real'(NFFT * DEC));
      @(posedge clk);
      #1;
      i1 += longint'(y_out); i2 += i1; i3 += i2; i4 += i3;
      if ((n % DEC) == DEC - 1) begin
        c1 = i4 - c1d; c1d = i4;
        c2 = c1 - c2d; c2d = c1;
        c3 = c2 - c3d; c3d = c2;
        c4 = c3 - c4d; c4d = c3;
        if (m >= 8) dec_out[m - 8] = real'(c4) / (real'(DEC) ** 4 * real'(COEF_ONE));
        m++;
      end
    end
    ps = 0.0; pn = 0.0;
    for (int k = 1; k < NFFT / 2; k++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < NFFT; n++) begin
        w = 2.0 * 3.14159265358979 * ((k * n) % NFFT) / NFFT;
        re += dec_out[n] * $cos(w);
        im -= dec_out[n] * $sin(w);
      end
      if (k >= KSIG - 1 && k <= KSIG + 1) ps += re * re + im * im;
      else                                pn += re * re + im * im;
    end
    snr_db = 10.0 * $log10(ps / pn);
  endtask

  initial begin
    longint t0;
    int busy_cycles;
    real e1_est, e2_est, e1_true, e2_true, snr_c, snr_u;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    #1;
    check(p1 == COEF_ONE && p2 == COEF_ONE && !cal_busy, "reset state");
    // let the modulator run normally for a while
    repeat (1000) @(negedge clk);
    // ---- calibration ----
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    busy_cycles = 0;
    while (cal_busy) begin
      busy_cycles++;
      @(negedge clk);
    end
    check(busy_cycles == 2 * (2 * (SETTLE + N) + 1),
          $sformatf("calibration time %0d cycles", busy_cycles));
    check(cal_done, "done after calibration");
    e1_est  = 1.0 - real'(p1) / real'(COEF_ONE);
    e2_est  = 1.0 - real'(p2) / real'(COEF_ONE);
    e1_true = 1.0 - PM1;
    e2_true = 1.0 - PM2;
    $display("counts: step1 %0d step2 %0d", cnt1, cnt2);
    $display("pole error 1: estimated %f model %f", e1_est, e1_true);
    $display("pole error 2: estimated %f model %f", e2_est, e2_true);
    check(e1_est > 0.85 * e1_true && e1_est < 1.15 * e1_true, "p1 estimate within 15 %");
    check(e2_est > 0.85 * e2_true && e2_est < 1.15 * e2_true, "p2 estimate within 15 %");
    // ---- conversion, corrected then uncorrected ----
    corr_en = 1'b1;
    convert(snr_c);
    n_corr++;
    corr_en = 1'b0;
    convert(snr_u);
    n_uncorr++;
    $display("SNR corrected %0.1f dB, uncorrected %0.1f dB", snr_c, snr_u);
    check(snr_c > snr_u + 12.0, "correction improves SNR by at least 2 bits");
    // ---- direct coefficient load ----
    corr_en = 1'b1;
    @(negedge clk);
    p_wr = 1'b1; p1_wdata = 17'h0_f000; p2_wdata = 17'h0_e000;
    @(negedge clk);
    p_wr = 1'b0;
    n_load++;
    check(p1 == 17'h0_f000 && p2 == 17'h0_e000, "direct coefficient load");
    // ---- mechanisms ----
    $display("cycles: normal %0d step1 %0d step2 %0d counting %0d opposite %0d",
             n_normal, n_step1, n_step2, n_count, n_opposite);
    $display("events: corrected runs %0d uncorrected runs %0d loads %0d", n_corr, n_uncorr, n_load);
    check(n_step1 > 0, "Step 1 occurred");
    check(n_step2 > 0, "Step 2 occurred (feedback delay on)");
    check(n_opposite == 2 * N, "opposite-sequence passes counted 2N samples");
    check(n_count == 4 * N, "counter enabled for 4N samples");
    check(n_normal > 0 && n_corr > 0 && n_uncorr > 0 && n_load > 0, "normal, corrected, uncorrected, load");
    check(n_delay_bad == 0, $sformatf("feedback DAC bit selection (%0d wrong)", n_delay_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
