// tb_trigger_matching: a trigger matching unit with its hit buffer and output FIFO.
// The testbench writes hits with rising time stamps (at most one per clock, a little in
// the past of 'now', as the channel does), sends triggers stamped with the current time
// and drains the output FIFO at random, so matching stalls now and then. For every
// trigger the words read must be exactly the recorded hits inside
// [T - latency, T - latency + width), oldest first, followed by the marker carrying T.
// Two window settings are used: one that has closed when the trigger arrives and one
// reaching past it, where the unit has to wait. Triggers close together give
// overlapping windows. Old hits must be deleted while no trigger is waiting.
`timescale 1ps/1ps
module tb_trigger_matching;
  import tdc_pkg::*;
  localparam int AW = 7, DEPTH = 128;
  logic clk = 0, rst = 1;
  time_t latency, width, now;
  logic trig_valid = 0, done, of_wr_en, of_full, of_rd_en = 0, of_empty;
  trig_t trig;
  logic [AW-1:0] rd_addr;
  hit_t rd_data, wr_data;
  logic [AW:0] head, wr_ptr;
  logic wr_en = 0, overflow, matched, deleted, stall;
  ofifo_word_t of_wr_data, of_rd_data;
  int checks = 0, failures = 0, n_stall = 0, n_del = 0, n_match = 0, n_overlap = 0, n_wait = 0, n_ovf = 0;
  hit_t hits [$];
  ofifo_word_t got [$];
  logic [COARSE_W-1:0] cyc = '0;

  always #1000 clk = ~clk;
  assign now = {cyc, 4'd0};

  hit_buffer #(.DEPTH(DEPTH), .AW(AW)) u_hb (.clk, .rst, .wr_en, .wr_data, .rd_addr, .rd_data, .head, .wr_ptr, .overflow);
  trigger_matching #(.AW(AW)) dut (
    .clk, .rst, .latency, .width, .now, .trig_valid, .trig, .done,
    .hb_rd_addr(rd_addr), .hb_rd_data(rd_data), .hb_head(head), .hb_wr_ptr(wr_ptr),
    .of_wr_en, .of_wr_data, .of_full, .matched, .deleted, .stall);
  sync_fifo #(.W($bits(ofifo_word_t)), .DEPTH(4)) u_of (
    .clk, .rst, .wr_en(of_wr_en), .wr_data(of_wr_data), .full(of_full),
    .rd_en(of_rd_en), .rd_data(of_rd_data), .empty(of_empty));

  initial begin
    #400_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // time base, hit source and output drain
  always @(posedge clk) begin
    if (!rst) cyc <= cyc + 1'b1;
    if (stall) n_stall++;
    if (deleted) n_del++;
    if (matched) n_match++;
    if (overflow && !rst) n_ovf++;
    if (of_rd_en) got.push_back(of_rd_data);
  end
  always @(negedge clk) begin
    wr_en   = !rst && ($urandom % 6 == 0);
    wr_data = '{leading: 1'($urandom), t: now - 16'd48 + 16'($urandom % 16)};
    if (wr_en) hits.push_back(wr_data);
    of_rd_en = !of_empty && ($urandom % (cyc[8] ? 8 : 2) == 0);
  end

  task automatic run_trigger(evt_t evt, output bit ok);
    time_t t, ws, we;
    ofifo_word_t expq [$];
    int guard;
    @(negedge clk);
    t = now;
    trig = '{evt: evt, t: t};
    trig_valid = 1;
    ws = t - latency; we = ws + width;
    if (tdiff(now, we) <= 64) n_wait++;
    guard = 0;
    while (!done && guard < 5000) begin @(negedge clk); guard++; end
    // reference, built from every hit recorded so far
    foreach (hits[i]) if (tdiff(hits[i].t, ws) >= 0 && tdiff(hits[i].t, we) < 0)
      expq.push_back('{marker: 1'b0, leading: hits[i].leading, t: hits[i].t});
    expq.push_back('{marker: 1'b1, leading: 1'b0, t: t});
    while (got.size() < expq.size() && guard < 5000) begin @(negedge clk); guard++; end
    trig_valid = 0;
    ok = 1;
    checks++;
    if (got.size() != expq.size()) begin
      ok = 0; $display("event %0d: %0d words, expected %0d guard %0d", evt, got.size(), expq.size(), guard);
    end else foreach (expq[i]) if (got[i] != expq[i]) begin
      ok = 0; $display("event %0d word %0d: %h expected %h", evt, i, got[i], expq[i]);
    end
    got.delete();
  endtask

  initial begin
    bit ok;
    evt_t evt = '0;
    latency = 16'd800; width = 16'd400;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (100) @(posedge clk);
    for (int i = 0; i < 60; i++) begin
      if (i == 30) begin latency = 16'd200; width = 16'd600; end
      run_trigger(evt, ok);
      if (!ok) failures++;
      evt++;
      // sometimes the next trigger follows at once: windows overlap
      if ($urandom % 3 == 0) n_overlap++;
      else repeat (20 + $urandom % 80) @(posedge clk);
      // drop old hits from the reference list (far older than any window)
      while (hits.size() > 0 && tdiff(now, hits[0].t) > 4000) void'(hits.pop_front());
    end
    // no trigger for a while: the buffer must hold only hits younger than latency+margin
    repeat (200) @(posedge clk);
    @(negedge clk);
    begin
      int young = 0;
      foreach (hits[i]) if (tdiff(hits[i].t, now - latency - 16'd256) >= -32) young++;
      checks++;
      if (int'(wr_ptr - head) > young + 2) begin
        failures++; $display("buffer holds %0d hits, at most %0d expected", wr_ptr - head, young + 2);
      end
    end
    checks++;
    if (n_stall == 0 || n_del == 0 || n_match == 0 || n_wait == 0 || n_ovf != 0) begin
      failures++; $display("stall %0d del %0d match %0d wait %0d overflow %0d", n_stall, n_del, n_match, n_wait, n_ovf);
    end
    $display("stalls %0d deletions %0d matches %0d overlapping %0d waiting %0d", n_stall, n_del, n_match, n_overlap, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
