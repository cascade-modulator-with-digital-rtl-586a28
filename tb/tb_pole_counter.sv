// tb_pole_counter: drives random sequence and output bits and compares the
// counter with a reference sum of (s - o)/2, s and o read as +1/-1 levels,
// negated while `sub` is high; also checks that `en` low holds the count and
// that `clear` zeroes it.
module tb_pole_counter;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear, en, sub, seq_bit, out_bit;
  logic signed [17:0] count;
  int ref_cnt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pole_counter dut (.clk, .rst_n, .clear, .en, .sub, .seq_bit, .out_bit, .count);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, o;
    clear = 1'b0; en = 1'b0; sub = 1'b0; seq_bit = 1'b0; out_bit = 1'b0;
    ref_cnt = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // biased bits so the count drifts in both directions
      seq_bit = $urandom_range(0, 9) < ((n < 1500) ? 7 : 3);
      out_bit = $urandom_range(0, 1) != 0;
      en      = $urandom_range(0, 7) != 0;
      sub     = (n >= 1000 && n < 2000);
      clear   = (n == 2500);
      s = seq_bit ? 1 : -1;
      o = out_bit ? 1 : -1;
      @(posedge clk);
      if (clear) ref_cnt = 0;
      else if (en) ref_cnt += (sub ? -(s - o) : (s - o)) / 2;
      #1;
      checks++;
      if (count != 18'(ref_cnt)) begin
        failures++;
        $display("FAIL n=%0d count=%0d expected %0d", n, count, ref_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
