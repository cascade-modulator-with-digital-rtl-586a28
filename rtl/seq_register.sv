// seq_register: recycling shift register holding the periodic test sequence
// used to measure the integrator pole errors.
//
// The register is L bits long and is loaded with L-1 ones followed by a single
// zero, the sequence [1 1 1 1 1 0] for L = 6. Each cycle with `advance` high
// it rotates by one place, so the output repeats with period L and, read as
// +1/-1 levels, has mean Q = (L-2)/L (2/3 for L = 6). `invert` gives the
// opposite sequence, used for the second evaluation that cancels an
// input-referred offset. `load` (or reset) restores the pattern so each
// evaluation starts at the same phase.
//
// Timing: seq_bit is the register's first cell (plus the inversion) and changes
// on the clock edge after `advance`. The sequence, its length and the recycling
// register follow the published method; load/advance/invert are this design's controls.
module seq_register #(
  parameter int unsigned L = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,     // restore the pattern (first bit = 1)
  input  logic advance,  // rotate by one sample
  input  logic invert,   // output the opposite sequence
  output logic seq_bit
);

  localparam logic [L-1:0] PATTERN = {1'b0, {(L-1){1'b1}}};  // bit 0 first out

  logic [L-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       sr <= PATTERN;
    else if (load)    sr <= PATTERN;
    else if (advance) sr <= {sr[0], sr[L-1:1]};
  end

  assign seq_bit = sr[0] ^ invert;

  initial assert (L > 5) else $error("seq_register: the Step 2 estimate needs L > 5");

endmodule
