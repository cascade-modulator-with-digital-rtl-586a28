// mc_channel: one converter for the gain-spread test: the behavioural
// modulator with poles P1..P3 connected to sd21_cal_top, followed by a
// measurement path. The measurement decimates y_out by DEC with a
// fourth-order sinc (CIC) filter, stores NFFT decimated samples while
// `capture` is high (after 8 flushing samples), and when `capture` falls
// computes the SNR by DFT: power in bins KSIG-1..KSIG+1 against all other
// bins from 1 to NFFT/2-1. Simulation only.
module mc_channel
  import sd_cal_pkg::*;
#(
  parameter real P1 = 1.0,
  parameter real P2 = 1.0,
  parameter real P3 = 1.0,
  parameter int  DEC = 128,
  parameter int  NFFT = 1024,
  parameter int  KSIG = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  real   x,
  input  logic  cal_start,
  input  logic  corr_en,
  input  logic  capture,
  output logic  cal_busy,
  output coef_t p1,
  output coef_t p2,
  output real   snr_db
);

  test_mode_e mod_mode;
  logic y1, y2, test_bit, dac1_bit, cal_done;
  logic signed [17:0] cnt1, cnt2;
  logic signed [COEF_F+4:0] y_out;

  sd21_modulator_model #(.P1(P1), .P2(P2), .P3(P3), .OFFSET(0.0)) u_mod (
    .clk, .rst_n, .x, .mode(mod_mode), .test_bit, .dac1_bit, .y1, .y2
  );

  sd21_cal_top u_dut (
    .clk, .rst_n, .y1, .y2, .mod_mode, .test_bit, .dac1_bit,
    .cal_start, .corr_en, .p_wr(1'b0), .p1_wdata('0), .p2_wdata('0),
    .cal_busy, .cal_done, .p1, .p2, .cnt1, .cnt2, .y_out
  );

  real    dec_out[NFFT];
  longint i1, i2, i3, i4, c1d, c2d, c3d, c4d;
  int     phase, m;

  initial snr_db = 0.0;

  always @(posedge clk) begin
    longint c1, c2, c3, c4;
    if (!capture) begin
      i1 = 0; i2 = 0; i3 = 0; i4 = 0; c1d = 0; c2d = 0; c3d = 0; c4d = 0;
      phase = 0; m = 0;
    end else begin
      i1 += longint'(y_out); i2 += i1; i3 += i2; i4 += i3;
      if (phase == DEC - 1) begin
        phase = 0;
        c1 = i4 - c1d; c1d = i4;
        c2 = c1 - c2d; c2d = c1;
        c3 = c2 - c3d; c3d = c2;
        c4 = c3 - c4d; c4d = c3;
        if (m >= 8 && m < NFFT + 8)
          dec_out[m - 8] = real'(c4) / (real'(DEC) ** 4 * real'(COEF_ONE));
        m++;
      end else begin
        phase++;
      end
    end
  end

  always @(negedge capture) begin
    real ps, pn, re, im, w;
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
  end

endmodule
