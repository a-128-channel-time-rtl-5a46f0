// tb_tdc_channel: one channel from input pin to hit buffer. The input toggles in the
// middle of chosen 160 ps bins; an edge in bin m after the last reset clock edge must be
// stored with time m (the index of the first sample that sees the new level). Edges
// fall at random bins, so every partition and every border is hit; now and then two
// edges fall into one clock period, where only the first may be kept and hit_lost must
// pulse. Afterwards the whole hit buffer is read back through the read port.
`timescale 1ps/1ps
module tb_tdc_channel;
  import tdc_pkg::*;
  localparam int P = 2560, BIN = 160, AW = 9;
  logic [7:0] clk_ph;
  logic rst = 1, din = 0, hit_valid, hit_lost, hb_overflow;
  time_t now;
  logic [AW-1:0] rd_addr = '0;
  hit_t rd_data;
  logic [AW:0] wr_ptr;
  hit_t expq [$];
  time t_e0;
  int checks = 0, failures = 0, n_lost = 0, exp_lost = 0;
  int bins_seen [16];
  phase_clock_gen #(.PERIOD_PS(P)) u_clk (.clk_ph);
  tdc_channel dut (.clk_ph, .rst, .din, .lead_en(1'b1), .trail_en(1'b1), .now,
                   .hb_rd_addr(rd_addr), .hb_rd_data(rd_data), .hb_head('0), .hb_wr_ptr(wr_ptr),
                   .hit_valid, .hit_lost, .hb_overflow);
  initial begin
    #(P * 20000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk_ph[0]) if (!rst && hit_lost) n_lost++;

  // toggle din in the middle of bin m (counted from the reference edge)
  task automatic edge_at(longint m);
    time target;
    target = t_e0 + time'(m * BIN) - time'(BIN / 2);
    if (target > $time) #(target - $time);
    din = ~din;
  endtask

  initial begin
    longint m, last_m;
    repeat (4) @(posedge clk_ph[0]);
    t_e0 = $time;
    rst <= 0;
    m = 64;
    last_m = -100;
    for (int i = 0; i < 150; i++) begin
      if (i % 10 == 9) begin
        // two edges inside one clock period: keep the first only
        longint n, m1, m2;
        n  = (m + 40) / 16;
        m1 = 16 * n + 1 + $urandom % 6;
        m2 = m1 + 2 + $urandom % 6;
        edge_at(m1);
        expq.push_back('{leading: din, t: time_t'(m1)});
        bins_seen[m1 % 16]++;
        edge_at(m2);
        exp_lost++;
        m = m2 + 40;
      end else begin
        m = m + 20 + $urandom % 40;
        edge_at(m);
        expq.push_back('{leading: din, t: time_t'(m)});
        bins_seen[m % 16]++;
      end
    end
    repeat (10) @(posedge clk_ph[0]);
    #10;
    // now must be the time of the period the hit finder looks at: edge index - 2
    checks++;
    if (now != time_t'(16 * (($time - t_e0) / P - 2))) begin
      failures++; $display("now %0d expected %0d", now, 16 * (($time - t_e0) / P - 2));
    end
    checks++;
    if (int'(wr_ptr) != expq.size()) begin failures++; $display("%0d hits stored, %0d expected", wr_ptr, expq.size()); end
    foreach (expq[i]) begin
      @(negedge clk_ph[0]); rd_addr = AW'(i);
      @(negedge clk_ph[0]);
      checks++;
      if (rd_data != expq[i]) begin
        failures++; $display("hit %0d: lead %b t %0d expected lead %b t %0d", i, rd_data.leading, rd_data.t, expq[i].leading, expq[i].t);
      end
    end
    checks++;
    if (n_lost != exp_lost) begin failures++; $display("lost %0d expected %0d", n_lost, exp_lost); end
    foreach (bins_seen[b]) begin
      checks++;
      if (bins_seen[b] == 0) begin failures++; $display("no edge in bin %0d", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
