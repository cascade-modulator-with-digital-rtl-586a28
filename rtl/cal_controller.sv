// cal_controller: sequencer of the foreground calibration of the integrator
// pole errors, and holder of the pole coefficients used by the
// reconstruction filter.
//
// On `start` it runs two steps. Step 1 disables the modulator's normal input
// and sends the test sequence into the first integrator; Step 2 disables the
// normal input of the second integrator, switches the one-sample delay into
// the feedback path and sends the sequence into the second integrator. Each
// step is one or two passes: the sequence, then (OFFSET_COMP = 1) the
// opposite sequence, whose count is subtracted so that an input-referred
// offset cancels. A pass first lets the modulator settle for SETTLE samples
// with the counter stopped, then counts for N samples. At the end of a step
// the estimate from pole_estimator is latched into p1 (Step 1) or p2 (Step 2)
// and the counter result into cnt1 / cnt2 for read-out. The modulator then
// returns to normal operation and `done` rises.
//
// p1 and p2 reset to 1.0, the ideal integrator, so the filter starts as the
// uncorrected one; `p_wr` loads them from outside (for instance values stored
// from an earlier calibration). Sequence state: IDLE -> SETTLE -> COUNT
// (-> SETTLE -> COUNT for the opposite pass) -> LATCH, per step, then IDLE.
// `busy` stays high for exactly 2 * ((1+OFFSET_COMP) * (SETTLE + N) + 1)
// cycles: each pass is SETTLE + N cycles and each step ends with one LATCH
// cycle.
//
// The two steps, the opposite-sequence pass and the update of the
// reconstruction filter from the counter outputs follow the published method; the
// settling interval, the order of passes and the automatic loading are this
// design's choices.
module cal_controller
  import sd_cal_pkg::*;
#(
  parameter int unsigned N           = 33000,
  parameter int unsigned SETTLE      = 256,
  parameter bit          OFFSET_COMP = 1'b1,
  parameter int unsigned CNT_W       = 18
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  // external load of the coefficients
  input  logic                    p_wr,
  input  coef_t                   p1_wdata,
  input  coef_t                   p2_wdata,
  // modulator and sequence control
  output test_mode_e              mode,
  output logic                    seq_load,
  output logic                    seq_advance,
  output logic                    seq_invert,
  // counter control and result
  output logic                    cnt_clear,
  output logic                    cnt_en,
  output logic                    cnt_sub,
  input  logic signed [CNT_W-1:0] cnt,
  // estimator
  output logic                    est_step2,
  input  coef_t                   p_est,
  // results
  output coef_t                   p1,
  output coef_t                   p2,
  output logic signed [CNT_W-1:0] cnt1,
  output logic signed [CNT_W-1:0] cnt2,
  output logic                    busy,
  output logic                    done
);

  typedef enum logic [1:0] {S_IDLE, S_SETTLE, S_COUNT, S_LATCH} state_e;

  localparam int unsigned TW = $clog2((N > SETTLE ? N : SETTLE) + 1);

  state_e          state;
  logic            step2;    // 0: Step 1, 1: Step 2
  logic            pass_b;   // 1: opposite-sequence pass
  logic [TW-1:0]   timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      step2  <= 1'b0;
      pass_b <= 1'b0;
      timer  <= '0;
      p1     <= COEF_ONE;
      p2     <= COEF_ONE;
      cnt1   <= '0;
      cnt2   <= '0;
      done   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (p_wr) begin
            p1 <= p1_wdata;
            p2 <= p2_wdata;
          end
          if (start) begin
            state  <= S_SETTLE;
            step2  <= 1'b0;
            pass_b <= 1'b0;
            timer  <= '0;
            done   <= 1'b0;
          end
        end
        S_SETTLE: begin
          if (timer == TW'(SETTLE - 1) || SETTLE == 0) begin
            state <= S_COUNT;
            timer <= '0;
          end else begin
            timer <= timer + 1'b1;
          end
        end
        S_COUNT: begin
          if (timer == TW'(N - 1)) begin
            timer <= '0;
            if (OFFSET_COMP && !pass_b) begin
              pass_b <= 1'b1;
              state  <= S_SETTLE;
            end else begin
              state <= S_LATCH;
            end
          end else begin
            timer <= timer + 1'b1;
          end
        end
        S_LATCH: begin
          pass_b <= 1'b0;
          if (!step2) begin
            p1    <= p_est;
            cnt1  <= cnt;
            step2 <= 1'b1;
            state <= S_SETTLE;
          end else begin
            p2    <= p_est;
            cnt2  <= cnt;
            step2 <= 1'b0;
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy        = (state != S_IDLE);
    mode        = !busy ? MODE_NORMAL : (step2 ? MODE_STEP2 : MODE_STEP1);
    est_step2   = step2;
    seq_invert  = pass_b;
    seq_advance = (state == S_SETTLE) || (state == S_COUNT);
    // restart the sequence at the beginning of every pass
    seq_load    = (state == S_IDLE) || (state == S_LATCH) ||
                  (state == S_COUNT && timer == TW'(N - 1));
    // the counter is cleared before the first pass of each step only
    cnt_clear   = (state == S_IDLE) || (state == S_LATCH);
    cnt_en      = (state == S_COUNT);
    cnt_sub     = pass_b;
  end

endmodule
