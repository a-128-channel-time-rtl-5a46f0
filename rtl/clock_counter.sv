// clock_counter: coarse time counter of the TDC.
//
// Counts periods of the system clock. A synchronous reset sets it to 0; from then on it
// counts up by one per clock and wraps at 2^W. Every TDC channel and the trigger unit
// hold a copy; because all copies leave reset on the same edge they always agree, so
// time stamps from different channels and the trigger share one time base. A counter
// per channel follows the block diagram of the design; the width is this design's choice.
`timescale 1ps/1ps
module clock_counter #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  end

endmodule
