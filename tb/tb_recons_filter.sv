// tb_recons_filter: drives random Y1/Y2 bits and random coefficient sets and
// compares the output with the filter equation
//   y[n] = y1[n-1] + y2[n] - (p1+p2) y2[n-1] + p1 p2 y2[n-2]
// evaluated in the testbench (the product p1 p2 truncated to the output's
// fraction bits, and the coefficients taken one clock late, as in the filter).
// Also checks that the ideal coefficients p1 = p2 = 1 give
// y1[n-1] + (1 - z^-1)^2 y2 exactly, and that `en` low freezes the output.
module tb_recons_filter;
  import sd_cal_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en, y1, y2;
  coef_t p1, p2;
  logic signed [COEF_F+4:0] y_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  recons_filter dut (.clk, .rst_n, .en, .y1, .y2, .p1, .p2, .y_out);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint h1, h2a, h2b, c1, c2, expv, one, last;
    int y1v, y2v;
    one = longint'(1) << COEF_F;
    en = 1'b1; y1 = 1'b0; y2 = 1'b0; p1 = COEF_ONE; p2 = COEF_ONE;
    repeat (2) @(posedge clk);
    // reset history reads as -1 samples; coefficient registers reset to 0
    h1 = -one; h2a = -one; h2b = -one;
    c1 = 0; c2 = 0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      if (n >= 1000 && (n % 97) == 0) begin
        p1 = COEF_W'($urandom_range(int'(COEF_ONE) - 4000, int'(COEF_ONE)));
        p2 = COEF_W'($urandom_range(int'(COEF_ONE) - 4000, int'(COEF_ONE)));
      end
      y1 = $urandom_range(0, 1) != 0;
      y2 = $urandom_range(0, 1) != 0;
      en = !(n >= 3000 && n < 3050);
      y1v = y1 ? 1 : -1;
      y2v = y2 ? 1 : -1;
      last = longint'(y_out);
      @(posedge clk);
      if (en) begin
        expv = h1 + y2v * one - h2a / one * c1 + h2b / one * c2;
        h1 = y1v * one; h2b = h2a; h2a = y2v * one;
      end else begin
        expv = last;
      end
      // coefficients used at this edge were registered at the previous one
      c1 = longint'(p1) + longint'(p2);
      c2 = (longint'(p1) * longint'(p2)) >>> COEF_F;
      #1;
      checks++;
      if (longint'(y_out) != expv) begin
        failures++;
        $display("FAIL n=%0d y_out=%0d expected %0d", n, y_out, expv);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
