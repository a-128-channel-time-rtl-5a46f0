// tb_f1_block: one F1-block (block number 3) with random edges on its eight channels and
// a series of triggers. For each trigger the S-Link FIFO must hold the F1 header, then
// for channel 0..7 the edges whose time lies in [T - latency, T - latency + width), then
// the F1 trailer with the number of data words. Edge times are worked out from the
// moment each edge is applied (bin m after the last reset clock edge gives time m).
// The S-Link FIFO is read slowly in part of the run so the output FIFOs back up.
`timescale 1ps/1ps
module tb_f1_block;
  import tdc_pkg::*;
  localparam int P = 2560, BIN = 160, BLK = 3, NTRIG = 24;
  localparam time_t LAT = 16'd800, WID = 16'd600;
  logic [7:0] clk_ph;
  logic rst = 1;
  logic [7:0] din = '0;
  logic trig_valid = 0, done, sf_rd_en = 0, sf_empty;
  trig_t trig;
  logic [31:0] sf_rd_data;
  logic [7:0] hit_valid, hit_lost, hb_overflow, matched, deleted, stall;
  time t_e0;
  hit_t hits [8][$];
  logic [31:0] got [$];
  int checks = 0, failures = 0, n_stall = 0, n_match = 0, n_del = 0;
  bit running = 0;

  phase_clock_gen #(.PERIOD_PS(P)) u_clk (.clk_ph);
  f1_block #(.BLOCK_ID(BLK), .OUT_DEPTH(4)) dut (
    .clk_ph, .rst, .din, .lead_en(1'b1), .trail_en(1'b1), .latency(LAT), .width(WID),
    .trig_valid, .trig, .done, .sf_rd_en, .sf_rd_data, .sf_empty,
    .hit_valid, .hit_lost, .hb_overflow, .matched, .deleted, .stall);

  initial begin
    #(P * 200000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic longint cur_period();
    return ($time - t_e0) / P;
  endfunction

  // edge sources, one per channel: gaps of 2 to 12 clock periods, any bin
  for (genvar c = 0; c < 8; c++) begin : g_src
    initial begin
      longint m;
      time target;
      wait (running);
      m = cur_period() * 16 + 16;
      while (running) begin
        m = m + 32 + $urandom % 160;
        target = t_e0 + time'(m * BIN) - time'(BIN / 2);
        #(target - $time);
        din[c] = ~din[c];
        hits[c].push_back('{leading: din[c], t: time_t'(m)});
      end
    end
  end

  always @(posedge clk_ph[0]) begin
    if (!rst) begin
      n_stall += $countones(stall);
      n_match += $countones(matched);
      n_del   += $countones(deleted);
    end
    if (sf_rd_en) got.push_back(sf_rd_data);
  end
  always @(negedge clk_ph[0]) sf_rd_en = !sf_empty && (cur_period() % 2000 < 1000 ? 1'b1 : ($urandom % 16 == 0));

  initial begin
    repeat (4) @(posedge clk_ph[0]);
    t_e0 = $time;
    rst <= 0;
    running = 1;
    repeat (200) @(posedge clk_ph[0]);
    for (int e = 0; e < NTRIG; e++) begin
      time_t tt, ws, we;
      automatic logic [31:0] expq [$];
      int guard;
      @(negedge clk_ph[0]);
      tt = time_t'(16 * cur_period());
      trig = '{evt: evt_t'(e), t: tt};
      trig_valid = 1;
      ws = tt - LAT; we = ws + WID;
      guard = 0;
      while (!done && guard < 20000) begin @(negedge clk_ph[0]); guard++; end
      trig_valid = 0;
      expq.push_back({3'b001, 4'(BLK), 12'(e), 13'd0});
      for (int c = 0; c < 8; c++)
        foreach (hits[c][i])
          if (tdiff(hits[c][i].t, ws) >= 0 && tdiff(hits[c][i].t, we) < 0)
            expq.push_back({3'b000, 7'(BLK * 8 + c), hits[c][i].leading, 5'd0, hits[c][i].t});
      expq.push_back({3'b010, 4'(BLK), 12'(e), 13'(expq.size() - 1)});
      while (got.size() < expq.size() && guard < 20000) begin @(negedge clk_ph[0]); guard++; end
      checks++;
      if (got.size() != expq.size()) begin
        failures++; $display("event %0d: %0d words, expected %0d", e, got.size(), expq.size());
      end else foreach (expq[i]) if (got[i] != expq[i]) begin
        failures++; $display("event %0d word %0d: %h expected %h", e, i, got[i], expq[i]); break;
      end
      for (int i = 0; i < expq.size() && got.size() > 0; i++) void'(got.pop_front());
      repeat (20 + $urandom % 300) @(posedge clk_ph[0]);
      for (int c = 0; c < 8; c++)
        while (hits[c].size() > 0 && tdiff(time_t'(16 * cur_period()), hits[c][0].t) > 8000) void'(hits[c].pop_front());
    end
    running = 0;
    checks++;
    if (n_stall == 0 || n_match == 0 || n_del == 0) begin
      failures++; $display("stall %0d match %0d deleted %0d", n_stall, n_match, n_del);
    end
    $display("stalls %0d matches %0d deletions %0d", n_stall, n_match, n_del);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
