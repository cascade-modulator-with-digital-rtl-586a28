// sd21_modulator_model: behavioural (non-synthesizable, real-valued) model of
// the analog 2-1 cascade switched-capacitor sigma-delta modulator, for
// simulation only.
//
// Stage 1 is a second-order double-loop modulator: two integrators
// z^-1/(1 - p z^-1) with input gains 1/2, both fed back from a single-bit DAC
// (+1/-1), and a comparator on the second integrator. Stage 2 is a
// first-order modulator (gain 1) that digitizes the first stage's
// quantization error, formed as 4*v2 - y1 (the inter-stage gain k = 4). The
// poles P1..P3 model finite amplifier gain (p = 1 - 1/A is a fair first-order
// approximation for gain A); P = 1.0 is the ideal integrator. OFFSET is an
// input-referred offset added at the input of the integrator receiving the
// signal or the test sequence.
//
// Test modes: MODE_STEP1 replaces the input X of the first integrator with the
// test bit (+1/-1), applied by the feedback DAC during the sampling phase;
// MODE_STEP2 disconnects the first integrator from the second and applies the
// test bit to the second integrator instead. In every mode the first stage's
// DAC follows dac1_bit, which the digital side drives (directly from y1, or
// delayed by one sample in Step 2).
//
// Timing: all integrators update on the rising clock edge from the inputs
// present just before it (non-blocking, so the digital side samples the
// old decisions at the same edge); y1 and y2 are comparator decisions on the current
// state and so change just after the edge.
module sd21_modulator_model
  import sd_cal_pkg::*;
#(
  parameter real P1     = 1.0,
  parameter real P2     = 1.0,
  parameter real P3     = 1.0,
  parameter real OFFSET = 0.0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  real        x,         // analog input, full scale +/-1
  input  test_mode_e mode,
  input  logic       test_bit,
  input  logic       dac1_bit,
  output logic       y1,
  output logic       y2
);

  real v1, v2, v3;

  function automatic real lvl(input logic b);
    return b ? 1.0 : -1.0;
  endfunction

  assign y1 = (v2 >= 0.0);
  assign y2 = (v3 >= 0.0);

  always @(posedge clk or negedge rst_n) begin
    real d1, u1, u2, e1;
    if (!rst_n) begin
      v1 <= 0.0; v2 <= 0.0; v3 <= 0.0;
    end else begin
      d1 = lvl(dac1_bit);
      e1 = 4.0 * v2 - lvl(y1);
      unique case (mode)
        MODE_STEP1: begin
          u1 = 0.5 * (lvl(test_bit) + OFFSET - d1);
          u2 = 0.5 * (v1 - d1);
        end
        MODE_STEP2: begin
          u1 = 0.0;
          u2 = 0.5 * (lvl(test_bit) + OFFSET - d1);
        end
        default: begin
          u1 = 0.5 * (x + OFFSET - d1);
          u2 = 0.5 * (v1 - d1);
        end
      endcase
      v3 <= P3 * v3 + (e1 - lvl(y2));
      v1 <= P1 * v1 + u1;
      v2 <= P2 * v2 + u2;
    end
  end

endmodule
