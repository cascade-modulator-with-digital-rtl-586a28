// recons_filter: digital reconstruction filter of the 2-1 cascade modulator,
// corrected for the pole errors of the first two integrators.
//
// The first stage (second-order loop) gives Y1 = z^-2 X + (1 - z^-1)^2 E1 and
// the second stage (first-order loop fed with the first stage's quantization
// error) gives Y2 = z^-1 E1 + (1 - z^-1) E2. Combining them as
//     Y = z^-1 Y1 + (1 - p1 z^-1)(1 - p2 z^-1) Y2
//       = z^-1 Y1 + Y2 - (p1 + p2) z^-1 Y2 + p1 p2 z^-2 Y2
// cancels E1 and leaves third-order shaped E2. With p1 = p2 = 1 this is the
// ideal filter z^-1 Y1 + (1 - z^-1)^2 Y2; with the measured poles of leaky
// integrators it matches the real noise shaping of the first stage.
//
// Y1 and Y2 are single bits read as +1 (1) and -1 (0). Because they are only
// signs, no multiplier sits in the signal path: each term adds or subtracts a
// coefficient. The coefficient sums c1 = p1 + p2 and c2 = p1 p2 are formed
// from p1, p2 (Q1.COEF_F) and registered, so a change of p1 or p2 reaches the
// output one cycle later. y_out is a signed value with COEF_F fraction bits
// (full scale of X is 1.0 = 2**COEF_F).
//
// Timing: one sample per clock while `en` is high. y_out is registered: the
// value after the clock edge that samples y1[n], y2[n] is
// y1[n-1] + y2[n] - c1*y2[n-1] + c2*y2[n-2]. The delay registers reset to 0,
// so the history before the first sample reads as -1.
// The filter equation follows the published method; the fixed-point format, the
// pipelining of c1/c2 and the reset values are this design's choices.
module recons_filter
  import sd_cal_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  y1,     // first-stage output bit
  input  logic  y2,     // second-stage output bit
  input  coef_t p1,
  input  coef_t p2,
  output logic signed [COEF_F+4:0] y_out
);

  localparam int unsigned YW = COEF_F + 5;
  localparam logic signed [YW-1:0] ONE = YW'(COEF_ONE);

  logic y1_d1, y2_d1, y2_d2;
  logic [COEF_W:0]     c1;   // p1 + p2, up to 2.0
  logic [COEF_W-1:0]   c2;   // p1 * p2, up to 1.0
  logic [2*COEF_W-1:0] prod;

  assign prod = p1 * p2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1 <= '0;
      c2 <= '0;
    end else begin
      c1 <= {1'b0, p1} + {1'b0, p2};
      c2 <= COEF_W'(prod >> COEF_F);
    end
  end

  function automatic logic signed [YW-1:0] sgn(input logic b, input logic signed [YW-1:0] v);
    return b ? v : -v;
  endfunction

  logic signed [YW-1:0] sum;

  always_comb begin
    sum = sgn(y1_d1, ONE)
        + sgn(y2, ONE)
        - sgn(y2_d1, YW'(c1))
        + sgn(y2_d2, YW'(c2));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1_d1 <= 1'b0;
      y2_d1 <= 1'b0;
      y2_d2 <= 1'b0;
      y_out <= '0;
    end else if (en) begin
      y1_d1 <= y1;
      y2_d1 <= y2;
      y2_d2 <= y2_d1;
      y_out <= sum;
    end
  end

endmodule
