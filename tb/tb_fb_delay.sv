// tb_fb_delay: checks the feedback-path selector. With delay_en low the DAC
// bit must equal the comparator bit of the same sample; with it high, the
// comparator bit of the previous sample. Random bits, both modes, switching
// between them.
module tb_fb_delay;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic delay_en, q_bit, dac_bit;
  logic prev;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fb_delay dut (.clk, .rst_n, .delay_en, .q_bit, .dac_bit);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    delay_en = 1'b0; q_bit = 1'b0; prev = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      q_bit    = $urandom_range(0, 1) != 0;
      delay_en = ((n / 50) % 2) == 1;
      #1;
      checks++;
      if (dac_bit !== (delay_en ? prev : q_bit)) begin
        failures++;
        $display("FAIL n=%0d delay_en=%0b q=%0b prev=%0b dac=%0b", n, delay_en, q_bit, prev, dac_bit);
      end
      @(posedge clk);
      prev = q_bit;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
