// tdc_register: the 16 sampling flip-flops of one shifted-clock-sampling TDC channel.
//
// The channel input din is sampled by eight flip-flops on the rising edges and eight
// flip-flops on the falling edges of eight phase-shifted clocks. Clock k is delayed by
// k/16 of the clock period, so the 16 sampling instants of one period are equidistant:
//   bin k     (k = 0..7): rising edge of clk_ph[k]   -> q_rise[k]
//   bin 8 + k (k = 0..7): falling edge of clk_ph[k]  -> q_fall[k]
// The falling-edge flip-flops stand for the local clock inversion available in every
// slice. Each output changes on its own clock edge; partition_sync brings the samples
// into one clock domain. The sampling scheme (16 flip-flops, half on each clock edge)
// follows the design description; the bin numbering is this design's convention.
`timescale 1ps/1ps
module tdc_register (
  input  logic [7:0] clk_ph,
  input  logic       din,
  output logic [7:0] q_rise,
  output logic [7:0] q_fall
);

  for (genvar k = 0; k < 8; k++) begin : g_ff
    logic r, f;
    always_ff @(posedge clk_ph[k]) r <= din;
    always_ff @(negedge clk_ph[k]) f <= din;
    assign q_rise[k] = r;
    assign q_fall[k] = f;
  end

endmodule
