// tb_cal_controller: checks the calibration sequencer cycle by cycle against
// the intended schedule, worked out from the pass length P = SETTLE + N and
// the step length 2P + 1: Step 1 then Step 2; in each step a settle interval
// and an N-sample count with the sequence, the same with the opposite
// sequence (counter direction reversed), then one latch cycle. Also checks
// the total busy time, the latching of the estimate and the counter result
// into p1/cnt1 and p2/cnt2, the reset values (ideal poles), and that the
// external coefficient load works only while idle. A second instance with
// OFFSET_COMP = 0 must run one pass per step and never reverse the counter.
module tb_cal_controller;
  import sd_cal_pkg::*;

  localparam int N = 20;
  localparam int SETTLE = 5;
  localparam int P = SETTLE + N;
  localparam int S = 2 * P + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start, p_wr;
  coef_t p1_wdata, p2_wdata, p_est, p1, p2;
  test_mode_e mode;
  logic seq_load, seq_advance, seq_invert, cnt_clear, cnt_en, cnt_sub, est_step2;
  logic signed [17:0] cnt, cnt1, cnt2;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cal_controller #(.N(N), .SETTLE(SETTLE), .OFFSET_COMP(1'b1), .CNT_W(18)) dut (
    .clk, .rst_n, .start, .p_wr, .p1_wdata, .p2_wdata,
    .mode, .seq_load, .seq_advance, .seq_invert,
    .cnt_clear, .cnt_en, .cnt_sub, .cnt, .est_step2, .p_est,
    .p1, .p2, .cnt1, .cnt2, .busy, .done
  );

  // single-pass configuration (no opposite-sequence evaluation)
  test_mode_e mode_b;
  logic seq_load_b, seq_advance_b, seq_invert_b, cnt_clear_b, cnt_en_b, cnt_sub_b, est_step2_b;
  coef_t p1_b, p2_b;
  logic signed [17:0] cnt1_b, cnt2_b;
  logic busy_b, done_b;
  int busy_b_cycles = 0, en_b_cycles = 0, sub_b_cycles = 0;

  cal_controller #(.N(N), .SETTLE(SETTLE), .OFFSET_COMP(1'b0), .CNT_W(18)) dut_b (
    .clk, .rst_n, .start, .p_wr(1'b0), .p1_wdata, .p2_wdata,
    .mode(mode_b), .seq_load(seq_load_b), .seq_advance(seq_advance_b), .seq_invert(seq_invert_b),
    .cnt_clear(cnt_clear_b), .cnt_en(cnt_en_b), .cnt_sub(cnt_sub_b), .cnt(18'sd7),
    .est_step2(est_step2_b), .p_est,
    .p1(p1_b), .p2(p2_b), .cnt1(cnt1_b), .cnt2(cnt2_b), .busy(busy_b), .done(done_b)
  );

  always @(negedge clk) begin
    if (busy_b) busy_b_cycles++;
    if (cnt_en_b) en_b_cycles++;
    if (cnt_sub_b || seq_invert_b) sub_b_cycles++;
  end

  // stand-ins for the counter and the estimator
  always_comb p_est = est_step2 ? coef_t'(COEF_ONE - 17'd222) : coef_t'(COEF_ONE - 17'd111);
  always_ff @(posedge clk) begin
    if (cnt_clear)   cnt <= '0;
    else if (cnt_en) cnt <= cnt + (cnt_sub ? -18'sd1 : 18'sd3);
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k, busy_cycles, step, r, pass, q;
    bit latch, counting;
    start = 1'b0; p_wr = 1'b0; p1_wdata = '0; p2_wdata = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    #1;
    check(p1 == COEF_ONE && p2 == COEF_ONE, "reset coefficients are 1.0");
    check(mode == MODE_NORMAL && !busy && seq_load && cnt_clear && !cnt_en, "idle outputs");
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    busy_cycles = 0;
    for (k = 0; k < 2 * S; k++) begin
      step  = k / S;
      r     = k % S;
      latch = (r == 2 * P);
      pass  = latch ? 0 : r / P;
      q     = r % P;
      counting = !latch && q >= SETTLE;
      check(busy, $sformatf("busy k=%0d", k));
      check(mode == (step != 0 ? MODE_STEP2 : MODE_STEP1), $sformatf("mode k=%0d", k));
      check(est_step2 == step[0], $sformatf("est_step2 k=%0d", k));
      check(cnt_en == counting, $sformatf("cnt_en k=%0d", k));
      check(!latch -> (cnt_sub == pass[0] && seq_invert == pass[0]), $sformatf("pass k=%0d", k));
      check(seq_advance == !latch, $sformatf("seq_advance k=%0d", k));
      check(cnt_clear == latch, $sformatf("cnt_clear k=%0d", k));
      check(seq_load == (latch || (counting && q == P - 1)), $sformatf("seq_load k=%0d", k));
      if (busy) busy_cycles++;
      @(negedge clk);
    end
    check(!busy && done && mode == MODE_NORMAL, "done after 2(2P+1) cycles");
    check(busy_cycles == 2 * (2 * (SETTLE + N) + 1), "busy cycle count");
    check(p1 == coef_t'(COEF_ONE - 17'd111) && p2 == coef_t'(COEF_ONE - 17'd222), "latched estimates");
    check(cnt1 == 18'sd40 && cnt2 == 18'sd40, $sformatf("latched counts %0d %0d", cnt1, cnt2));
    // single-pass instance: one pass per step, never the opposite sequence
    check(busy_b_cycles == 2 * (SETTLE + N + 1), $sformatf("single-pass busy %0d", busy_b_cycles));
    check(en_b_cycles == 2 * N && sub_b_cycles == 0, "single-pass counting");
    check(done_b && p1_b == coef_t'(COEF_ONE - 17'd111) && p2_b == coef_t'(COEF_ONE - 17'd222),
          "single-pass latched estimates");
    // external load while idle
    p_wr = 1'b1; p1_wdata = 17'h0_ff00; p2_wdata = 17'h0_fe00;
    @(negedge clk);
    p_wr = 1'b0;
    check(p1 == 17'h0_ff00 && p2 == 17'h0_fe00, "external load");
    // external load is ignored during a calibration
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    p_wr = 1'b1; p1_wdata = 17'h0_0001; p2_wdata = 17'h0_0001;
    @(negedge clk);
    p_wr = 1'b0;
    check(busy && p1 == 17'h0_ff00, "load ignored while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
