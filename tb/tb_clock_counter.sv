// tb_clock_counter: checks that the coarse counter restarts at 0 on reset, counts one per
// clock and wraps at 2^W (W reduced to 4 to see the wrap).
`timescale 1ps/1ps
module tb_clock_counter;
  logic clk = 0, rst = 1;
  logic [3:0] count;
  int checks = 0, failures = 0;
  always #1000 clk = ~clk;
  clock_counter #(.W(4)) dut (.clk, .rst, .count);
  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 1; i <= 40; i++) begin
      @(posedge clk); #1;
      checks++; if (count != 4'(i)) begin failures++; $display("count %0d expected %0d", count, i % 16); end
      if (i == 20) begin rst <= 1; @(posedge clk); #1; rst <= 0; checks++; if (count != 0) failures++; i = 0; end
      if (i == 0) break;
    end
    for (int i = 1; i <= 20; i++) begin
      @(posedge clk); #1;
      checks++; if (count != 4'(i)) begin failures++; $display("count %0d expected %0d", count, i % 16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
