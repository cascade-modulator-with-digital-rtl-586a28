// tb_sd21_gain_spread: the correction over a spread of amplifier gains.
// NCH converters, each a behavioural modulator with its own three amplifier
// gains drawn (deterministically) from 30 dB to 70 dB and the pole of each
// integrator set to 1 - 1/A, connected to sd21_cal_top at its default sizes.
// All are calibrated, then convert a 70 %-of-full-scale sine with the
// corrected filter and again with the ideal filter; the SNR is measured after
// decimation by 128 over 1024 decimated samples.
// Checks, per converter: the estimated pole errors are within 20 % (or
// 1.6e-4 absolute, about four counts of the Step 2 counter at N = 33000,
// which is what the measurement resolves above 60 dB) of the model's, and the
// corrected SNR is within 10 dB of the best corrected one. Overall: the
// corrected SNRs spread over a narrower range than the uncorrected ones, and
// the mean improvement is at least 1 bit. A converter may lose a few dB with
// the correction: the filter corrects only the first two poles, so when those
// are nearly ideal the uncorrected leak of the third integrator can dominate.
module tb_sd21_gain_spread;
  import sd_cal_pkg::*;

  localparam int NCH = 32;
  localparam int DEC = 128, NFFT = 1024, KSIG = 3;

  function automatic real gain_db(int ch, int integ);
    real f = (ch * 0.6180339887 + integ * 0.4142135624 + 0.1234);
    return 30.0 + 40.0 * (f - $floor(f));
  endfunction

  function automatic real pole(int ch, int integ);
    return 1.0 - 1.0 / (10.0 ** (gain_db(ch, integ) / 20.0));
  endfunction

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  real  x = 0.0;
  logic cal_start = 1'b0, corr_en = 1'b1, capture = 1'b0;
  logic [NCH-1:0] busy;
  coef_t p1 [NCH];
  coef_t p2 [NCH];
  real   snr [NCH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    mc_channel #(.P1(pole(i, 0)), .P2(pole(i, 1)), .P3(pole(i, 2)),
                 .DEC(DEC), .NFFT(NFFT), .KSIG(KSIG)) u_ch (
      .clk, .rst_n, .x, .cal_start, .corr_en, .capture,
      .cal_busy(busy[i]), .p1(p1[i]), .p2(p2[i]), .snr_db(snr[i])
    );
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_sine();
    capture = 1'b1;
    for (int n = 0; n < (NFFT + 8) * DEC; n++) begin
      @(negedge clk);
      x = 0.7 * $sin(2.0 * 3.14159265358979 * KSIG * n / real'(NFFT * DEC));
    end
    @(negedge clk);
    capture = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    real snr_c [NCH];
    real e_est, e_true, tol, gain_sum, cmax, cmin, umax, umin;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (500) @(negedge clk);
    cal_start = 1'b1;
    @(negedge clk);
    cal_start = 1'b0;
    while (busy != '0) @(negedge clk);
    for (int i = 0; i < NCH; i++) begin
      for (int s = 0; s < 2; s++) begin
        e_true = 1.0 - pole(i, s);
        e_est  = 1.0 - real'(s == 0 ? p1[i] : p2[i]) / real'(COEF_ONE);
        tol    = 0.2 * e_true > 1.6e-4 ? 0.2 * e_true : 1.6e-4;
        check(e_est - e_true < tol && e_true - e_est < tol,
              $sformatf("ch %0d pole %0d: gain %0.1f dB, 1-p estimated %0.6f model %0.6f",
                        i, s + 1, gain_db(i, s), e_est, e_true));
      end
    end
    corr_en = 1'b1;
    run_sine();
    for (int i = 0; i < NCH; i++) snr_c[i] = snr[i];
    corr_en = 1'b0;
    run_sine();
    gain_sum = 0.0;
    cmax = -1000.0; cmin = 1000.0; umax = -1000.0; umin = 1000.0;
    for (int i = 0; i < NCH; i++) begin
      if (snr_c[i] > cmax) cmax = snr_c[i];
      if (snr_c[i] < cmin) cmin = snr_c[i];
      if (snr[i] > umax) umax = snr[i];
      if (snr[i] < umin) umin = snr[i];
    end
    for (int i = 0; i < NCH; i++) begin
      $display("ch %2d gains %4.1f %4.1f %4.1f dB  SNR corrected %5.1f dB uncorrected %5.1f dB",
               i, gain_db(i, 0), gain_db(i, 1), gain_db(i, 2), snr_c[i], snr[i]);
      check(snr_c[i] > cmax - 10.0, $sformatf("ch %0d corrected SNR near the best", i));
      gain_sum += (snr_c[i] - snr[i]) / 6.02;
    end
    $display("mean improvement %0.2f bits over %0d converters", gain_sum / NCH, NCH);
    $display("corrected SNR %0.1f..%0.1f dB, uncorrected %0.1f..%0.1f dB", cmin, cmax, umin, umax);
    check(cmax - cmin < umax - umin, "correction narrows the SNR spread");
    check(gain_sum / NCH > 1.0, "mean improvement at least 1 bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
