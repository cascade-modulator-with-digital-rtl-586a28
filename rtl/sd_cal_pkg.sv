// sd_cal_pkg: types and constants shared by the digital correction logic of
// the 2-1 cascade sigma-delta modulator.
//
// Integrator poles p1, p2 are held as unsigned fixed-point numbers with one
// integer bit and COEF_F fraction bits (Q1.COEF_F), so 1.0 is 2**COEF_F and
// the ideal integrator (p = 1) is COEF_ONE. The word length is this design's
// choice: 16 fraction bits resolve a pole error 1 - p of 3e-4 (amplifier gain
// of 70 dB, the top of the range the modulator is meant for) to about 5 %.
//
// test_mode_e names the three configurations of the analog modulator:
// normal conversion, Step 1 (input path disabled, test sequence into the
// first integrator) and Step 2 (input of the second integrator disabled, test
// sequence into the second integrator, one-sample delay in the feedback).
package sd_cal_pkg;

  localparam int unsigned COEF_F   = 16;
  localparam int unsigned COEF_W   = COEF_F + 1;
  localparam logic [COEF_W-1:0] COEF_ONE = COEF_W'(1) << COEF_F;

  typedef logic [COEF_W-1:0] coef_t;

  typedef enum logic [1:0] {
    MODE_NORMAL = 2'd0,
    MODE_STEP1  = 2'd1,
    MODE_STEP2  = 2'd2
  } test_mode_e;

endpackage
