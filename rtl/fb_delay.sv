// fb_delay: digital feedback path of the first stage's DAC.
//
// In normal operation and in Step 1 the DAC is driven by the quantizer bit of
// the same sample. In Step 2 a one-sample delay (z^-1) is switched into this
// path, which turns the second integrator and the first quantizer into a
// first-order loop with a delayed feedback, the configuration the Step 2
// counter formula assumes.
//
// Interface: q_bit is the first-stage comparator output, sampled once per
// clock; delay_en selects the delayed path; dac_bit drives the DAC. The delay
// register is cleared to 0 on reset. Combinational from q_bit to dac_bit when
// delay_en is low; one cycle of latency when it is high. The z^-1 and its place
// follow the published method; the multiplexer is this design's way of switching it in.
module fb_delay (
  input  logic clk,
  input  logic rst_n,
  input  logic delay_en,
  input  logic q_bit,
  output logic dac_bit
);

  logic q_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_d <= 1'b0;
    else        q_d <= q_bit;
  end

  assign dac_bit = delay_en ? q_d : q_bit;

endmodule
