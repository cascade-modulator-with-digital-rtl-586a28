// pole_estimator: converts the result of the pole-error counter into an
// estimate of the integrator pole p, in the Q1.COEF_F format of sd_cal_pkg.
//
// The counter of Step 1 settles near 2*N*Q*(1 - p1) and that of Step 2 near
// 2*N*(1 - p2) / ln((3L-5)/(L-5)), with N the number of summed samples, L the
// sequence length and Q = (L-2)/L the sequence mean. Those figures hold for
// the sum of the +1/-1 difference, which is twice what pole_counter counts;
// when the opposite sequence is also evaluated and subtracted the result
// doubles again. The pole error e = 1 - p is therefore the count times a
// constant: K1 = L / (N (L-2) (1+OFFSET_COMP)) for Step 1 and
// K2 = ln((3L-5)/(L-5)) / (N (1+OFFSET_COMP)) for Step 2.
// Both constants are worked out at elaboration to SH extra fraction bits and
// applied with one multiplier; `step2` selects which. The result is clamped
// so that 0 <= p <= 1.
//
// Purely combinational. The two formulas follow the published method; using a constant
// multiplier rather than choosing N, L and Q so that a shift suffices, and the
// clamp, are this design's choices (a shift is what the constant reduces to
// when N (L-2) / L is a power of two).
module pole_estimator
  import sd_cal_pkg::*;
#(
  parameter int unsigned N           = 33000,
  parameter int unsigned L           = 6,
  parameter bit          OFFSET_COMP = 1'b1,
  parameter int unsigned CNT_W       = 18,
  parameter int unsigned SH          = 20
) (
  input  logic                    step2,  // 0: Step 1 formula, 1: Step 2 formula
  input  logic signed [CNT_W-1:0] count,
  output coef_t                   p_est
);

  localparam real PASSES = OFFSET_COMP ? 2.0 : 1.0;
  localparam real K1_R   = real'(L) / (real'(N) * real'(L - 2) * PASSES);
  localparam real K2_R   = $ln(real'(3 * L - 5) / real'(L - 5)) / (real'(N) * PASSES);
  localparam real SCALE  = 2.0 ** (COEF_F + SH);
  localparam longint K1_L = longint'(K1_R * SCALE);
  localparam longint K2_L = longint'(K2_R * SCALE);
  localparam int unsigned KW = $clog2((K1_L > K2_L ? K1_L : K2_L) + 1);
  localparam logic [KW-1:0] K1 = KW'(K1_L);
  localparam logic [KW-1:0] K2 = KW'(K2_L);
  localparam int unsigned PW = CNT_W + KW + 1;

  logic signed [PW-1:0] prod;
  logic signed [PW-1:0] err;   // 1 - p in Q.COEF_F

  always_comb begin
    prod = PW'(count) * $signed({1'b0, (step2 ? K2 : K1)});
    err  = prod >>> SH;
    if (err <= 0)                     p_est = COEF_ONE;
    else if (err >= PW'(COEF_ONE))    p_est = '0;
    else                              p_est = COEF_ONE - COEF_W'(err);
  end

endmodule
