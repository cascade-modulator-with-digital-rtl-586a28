// tb_seq_register: checks the recycling test-sequence register.
// The expected sequence is L-1 ones then one zero, repeating, read from the
// output one sample per clock; also checks hold (advance low), the opposite
// sequence (invert) and the restart of the pattern on load. Run for L = 6 (the
// default) and for L = 9.
module tb_seq_register;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load, advance, invert;
  logic bit6, bit9;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  seq_register             dut6 (.clk, .rst_n, .load, .advance, .invert, .seq_bit(bit6));
  seq_register #(.L(9))    dut9 (.clk, .rst_n, .load, .advance, .invert, .seq_bit(bit9));

  function automatic logic expect_bit(int n, int len, logic inv);
    return ((n % len) != len - 1) ^ inv;
  endfunction

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
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
    int ones6;
    load = 1'b0; advance = 1'b0; invert = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // plain sequence, 4 periods of L=6 and of L=9 (36 samples)
    advance = 1'b1;
    ones6 = 0;
    for (int n = 0; n < 36; n++) begin
      #1;
      check(bit6, expect_bit(n, 6, 1'b0), $sformatf("L=6 n=%0d", n));
      check(bit9, expect_bit(n, 9, 1'b0), $sformatf("L=9 n=%0d", n));
      ones6 += bit6;
      @(negedge clk);
    end
    // mean of L=6 sequence as +/-1 levels is 2/3: 30 ones out of 36
    checks++;
    if (ones6 != 30) begin failures++; $display("FAIL mean: %0d ones", ones6); end
    // hold: advance low keeps the output
    advance = 1'b0;
    for (int n = 0; n < 5; n++) begin
      #1; check(bit6, expect_bit(36, 6, 1'b0), "hold");
      @(negedge clk);
    end
    // load restarts, then the opposite sequence
    load = 1'b1;
    @(negedge clk);
    load = 1'b0; advance = 1'b1; invert = 1'b1;
    for (int n = 0; n < 18; n++) begin
      #1;
      check(bit6, expect_bit(n, 6, 1'b1), $sformatf("inv L=6 n=%0d", n));
      check(bit9, expect_bit(n, 9, 1'b1), $sformatf("inv L=9 n=%0d", n));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
