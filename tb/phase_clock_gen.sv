// phase_clock_gen: behavioural model of the two PLLs that supply the sampling clocks.
// Produces eight clocks of period PERIOD_PS, clock k delayed by k/16 of the period, all
// with 50% duty cycle, so that their 16 edges per period are equidistant. Simulation only.
`timescale 1ps/1ps
module phase_clock_gen #(
  parameter int PERIOD_PS = 2560
) (
  output logic [7:0] clk_ph
);
  for (genvar k = 0; k < 8; k++) begin : g_ph
    logic c;
    initial begin
      c = 1'b0;
      #(k * PERIOD_PS / 16);
      forever begin
        c = 1'b1;
        #(PERIOD_PS / 2);
        c = 1'b0;
        #(PERIOD_PS / 2);
      end
    end
    assign clk_ph[k] = c;
  end
endmodule
