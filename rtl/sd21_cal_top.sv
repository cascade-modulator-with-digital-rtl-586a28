// sd21_cal_top: digital half of a 2-1 cascade sigma-delta modulator whose
// reconstruction filter is corrected for the finite DC gain of its
// amplifiers.
//
// Finite amplifier gain turns each integrator z^-1/(1 - z^-1) into a leaky
// one, z^-1/(1 - p z^-1) with p slightly below 1. The first stage's
// quantization noise is then shaped by (1 - p1 z^-1)(1 - p2 z^-1) rather than
// (1 - z^-1)^2 and is no longer cancelled by the ideal reconstruction filter.
// This block measures p1 and p2 in the foreground with a test sequence and an
// up/down counter, and uses them in the reconstruction filter.
//
// Blocks: cal_controller (sequencer and coefficient registers), seq_register
// (recycling register with the test sequence), fb_delay (optional z^-1 in the
// first stage's digital feedback), pole_counter (AND gates and up/down
// counter), pole_estimator (counter -> pole) and recons_filter.
//
// Analog interface (the switched-capacitor modulator is outside this block):
//   y1, y2       comparator outputs of stage 1 and stage 2, one per clock
//   mod_mode     MODE_NORMAL / MODE_STEP1 / MODE_STEP2: which input switches
//                the modulator opens (Step 1: its input X; Step 2: the input
//                of the second integrator)
//   test_bit     sequence bit the modulator's feedback DAC applies during the
//                sampling phase in Step 1 and Step 2
//   dac1_bit     bit for the first stage's feedback DAC (y1, or y1 delayed by
//                one sample in Step 2)
// Digital interface: cal_start starts a calibration (busy while it runs,
// done afterwards); corr_en = 0 forces the ideal filter (p1 = p2 = 1);
// p_wr/p1_wdata/p2_wdata load coefficients directly; y_out is the filtered
// output with COEF_F fraction bits, one per clock, registered.
//
// The structure follows the published method (G. Leger, A. Rueda, "Cascade
// sigma-delta modulator with digital correction for finite amplifier gain
// effects"); the interface signals, the sequencer and the fixed-point formats
// are this design's.
module sd21_cal_top
  import sd_cal_pkg::*;
#(
  parameter int unsigned N           = 33000,
  parameter int unsigned L           = 6,
  parameter int unsigned SETTLE      = 256,
  parameter bit          OFFSET_COMP = 1'b1,
  parameter int unsigned CNT_W       = $clog2(2 * N + 1) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // modulator
  input  logic                    y1,
  input  logic                    y2,
  output test_mode_e              mod_mode,
  output logic                    test_bit,
  output logic                    dac1_bit,
  // control
  input  logic                    cal_start,
  input  logic                    corr_en,
  input  logic                    p_wr,
  input  coef_t                   p1_wdata,
  input  coef_t                   p2_wdata,
  // results
  output logic                    cal_busy,
  output logic                    cal_done,
  output coef_t                   p1,
  output coef_t                   p2,
  output logic signed [CNT_W-1:0] cnt1,
  output logic signed [CNT_W-1:0] cnt2,
  output logic signed [COEF_F+4:0] y_out
);

  logic seq_load, seq_advance, seq_invert;
  logic cnt_clear, cnt_en, cnt_sub, est_step2;
  logic signed [CNT_W-1:0] cnt;
  coef_t p_est, p1_f, p2_f;

  cal_controller #(
    .N(N), .SETTLE(SETTLE), .OFFSET_COMP(OFFSET_COMP), .CNT_W(CNT_W)
  ) u_ctrl (
    .clk, .rst_n, .start(cal_start),
    .p_wr, .p1_wdata, .p2_wdata,
    .mode(mod_mode), .seq_load, .seq_advance, .seq_invert,
    .cnt_clear, .cnt_en, .cnt_sub, .cnt,
    .est_step2, .p_est,
    .p1, .p2, .cnt1, .cnt2,
    .busy(cal_busy), .done(cal_done)
  );

  seq_register #(.L(L)) u_seq (
    .clk, .rst_n, .load(seq_load), .advance(seq_advance), .invert(seq_invert),
    .seq_bit(test_bit)
  );

  fb_delay u_fbd (
    .clk, .rst_n, .delay_en(mod_mode == MODE_STEP2), .q_bit(y1), .dac_bit(dac1_bit)
  );

  pole_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n, .clear(cnt_clear), .en(cnt_en), .sub(cnt_sub),
    .seq_bit(test_bit), .out_bit(y1), .count(cnt)
  );

  pole_estimator #(
    .N(N), .L(L), .OFFSET_COMP(OFFSET_COMP), .CNT_W(CNT_W)
  ) u_est (
    .step2(est_step2), .count(cnt), .p_est
  );

  assign p1_f = corr_en ? p1 : COEF_ONE;
  assign p2_f = corr_en ? p2 : COEF_ONE;

  recons_filter u_filt (
    .clk, .rst_n, .en(!cal_busy), .y1, .y2, .p1(p1_f), .p2(p2_f), .y_out
  );

endmodule
