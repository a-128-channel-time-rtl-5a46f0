// tb_trigger_unit: trigger pulses at random phases; each must come out of the trigger
// FIFO with the next event number and the time 16*m, m being the index (counted from the
// last reset clock) of the first clock edge after the trigger's rising edge. Triggers
// sent while the FIFO is full must be dropped with trig_lost.
`timescale 1ps/1ps
module tb_trigger_unit;
  import tdc_pkg::*;
  localparam int P = 2560, DEPTH = 4;
  logic clk = 0, rst = 1, trig_in = 0, trig_valid, trig_pop = 0, trig_lost;
  trig_t trig;
  time t_e0;
  trig_t expq [$];
  int checks = 0, failures = 0, nlost = 0, nexp_lost = 0;
  evt_t next_evt = '0;
  always #(P / 2) clk = ~clk;
  trigger_unit #(.TRIG_DEPTH(DEPTH)) dut (.clk, .rst, .trig_in, .trig_valid, .trig, .trig_pop, .trig_lost);
  initial begin
    #(P * 100000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (trig_lost) nlost++;
  // edges of clk: rising at P/2 + k*P
  task automatic send(int gap_clks);
    time t;
    #(gap_clks * P + ($urandom % P));
    t = $time;
    trig_in = 1;
    #(3 * P) trig_in = 0;
    #P;
  endtask
  initial begin
    repeat (4) @(posedge clk);
    t_e0 = $time;
    rst <= 0;
    for (int i = 0; i < 60; i++) begin
      time t;
      int m;
      bit fifo_full;
      #(($urandom % 8) * P + ($urandom % P) + 1);
      t = $time;
      // index of the first rising clock edge strictly after t
      m = int'((t - t_e0) / P) + 1;
      fifo_full = (expq.size() == DEPTH);
      trig_in = 1;
      #(3 * P) trig_in = 0;
      #(2 * P);
      if (fifo_full) nexp_lost++;
      else begin
        expq.push_back('{evt: next_evt, t: time_t'(16 * m)});
        next_evt++;
      end
      // pop sometimes, so the FIFO fills now and then
      if (i % 10 < 6) begin
        while (expq.size() > 0 && ($urandom % 3 != 0)) begin
          @(negedge clk);
          checks++;
          if (!trig_valid || trig != expq[0]) begin
            failures++; $display("head %b %h expected %h", trig_valid, trig, expq[0]);
          end
          trig_pop = 1; @(negedge clk); trig_pop = 0;
          void'(expq.pop_front());
        end
      end
    end
    checks++;
    if (nlost != nexp_lost || nlost == 0) begin failures++; $display("lost %0d expected %0d", nlost, nexp_lost); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
