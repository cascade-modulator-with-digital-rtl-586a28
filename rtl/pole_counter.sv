// pole_counter: up/down counter that sums the difference between the test
// sequence fed to the modulator and the bit-stream the modulator returns.
//
// Two AND terms drive the counter: `up` when the sequence bit is 1 and the
// output bit is 0, `down` when the sequence bit is 0 and the output bit is 1.
// Over a window the count is therefore half the sum of (sequence - output)
// with both streams read as +1/-1 levels. For a leaky integrator the output
// mean falls short of the sequence mean by an amount proportional to the pole
// error, and this count measures it.
//
// `sub` swaps up and down. The calibration uses it to subtract the evaluation
// made with the opposite sequence from the first one in the same register,
// which cancels an input-referred offset. `clear` has priority over `en`.
//
// Timing: one update per clock while `en` is high; `count` is registered. The
// AND gates and the up/down counter follow the published method; the width, clear and
// `sub` controls are this design's.
module pole_counter #(
  parameter int unsigned CNT_W = 18
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    en,
  input  logic                    sub,
  input  logic                    seq_bit,  // test sequence bit sent to the DAC
  input  logic                    out_bit,  // modulator output bit, same sample
  output logic signed [CNT_W-1:0] count
);

  logic up, down;

  always_comb begin
    up   = seq_bit & ~out_bit;
    down = ~seq_bit & out_bit;
    if (sub) {up, down} = {down, up};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          count <= '0;
    else if (clear)      count <= '0;
    else if (en && up)   count <= count + 1'b1;
    else if (en && down) count <= count - 1'b1;
  end

endmodule
