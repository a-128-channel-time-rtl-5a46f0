// tb_tdc128_top: end-to-end test of the 128-channel TDC at its full size.
//
// Every channel receives edges at random bins; the testbench records each edge with the
// time it must get (bin m after the last reset clock edge gives time m). Triggers are
// applied at random phases; a trigger whose rising edge precedes clock edge m must carry
// time 16*m. The S-Link word stream is parsed into events and every event is compared
// with the one built from the recorded edges: event header, for each of the 16 blocks
// its F1 header, the edges of its 8 channels inside [T - latency, T - latency + width)
// channel by channel, its F1 trailer, and the event trailer with the word count.
//
// The run goes through these phases, so that every mechanism happens:
//   A  both edges, triggers at random spacing, some so close that windows overlap
//   B  leading edges only, C trailing edges only
//   D  quiet inputs and a burst of triggers whose window reaches past the trigger, with
//      the link blocked: the trigger FIFO fills and a trigger is lost
//   E  no triggers, long latency, one channel firing every clock period: hit buffer
//      overflow; then normal latency, old hits deleted, and phase A again
// Channel 5 now and then gets two edges in one clock period (second edge dropped).
`timescale 1ps/1ps
module tb_tdc128_top;
  import tdc_pkg::*;
  localparam int P = 2560, BIN = 160;
  logic [7:0] clk_ph;
  logic rst = 1, trig_in = 0, lead_en = 1, trail_en = 1, out_valid, out_ready = 1;
  logic [127:0] din = '0;
  time_t latency = 16'd800, width = 16'd600;
  logic [31:0] out_data;
  logic hb_overflow_any, hit_lost_any, trig_lost, stall_any, hit_any, match_any, delete_any;

  time t_e0;
  bit running = 0, burst7 = 0, link_block = 0, quiet = 0;
  // edges as recorded by the testbench, with untruncated times (bins since reference)
  typedef struct { logic leading; longint t; } edge_rec_t;
  edge_rec_t hits [128][$];
  // accepted triggers, and the settings they were sent under
  longint trig_t_q [$];
  time_t lat_q [$], wid_q [$];
  logic  lead_q [$], trail_q [$];
  logic [31:0] ev_words [$];
  int checks = 0, failures = 0, n_events = 0, n_sent = 0;
  int n_lead = 0, n_trail = 0, n_border = 0, n_overlap = 0, n_lost_hit = 0, n_ovf = 0, n_tlost = 0;
  int n_stall = 0, n_hold = 0, n_del = 0, n_match = 0, n_lead_only = 0, n_trail_only = 0;
  longint last_trig_t = 0;

  phase_clock_gen #(.PERIOD_PS(P)) u_clk (.clk_ph);
  tdc128_top dut (
    .clk_ph, .rst, .din, .trig_in, .lead_en, .trail_en, .latency, .width,
    .out_data, .out_valid, .out_ready,
    .hb_overflow_any, .hit_lost_any, .trig_lost, .stall_any, .hit_any, .match_any, .delete_any);

  initial begin
    #(longint'(P) * 60000); failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic longint cur_period();
    return ($time - t_e0) / P;
  endfunction

  // ---------------- edge sources ----------------
  for (genvar c = 0; c < 128; c++) begin : g_src
    initial begin
      longint m, m2;
      time target;
      wait (running);
      m = cur_period() * 16 + 16 + c;
      forever begin
        if (c == 7 && burst7) m = m + 16;                 // one edge every clock period
        else if (quiet) m = m + 1000 + $urandom % 4000;
        else m = m + 64 + $urandom % 1000;
        target = t_e0 + time'(m * BIN) - time'(BIN / 2);
        #(target - $time);
        din[c] = ~din[c];
        if ((din[c] && lead_en) || (!din[c] && trail_en))
          hits[c].push_back('{leading: din[c], t: m});
        if (c == 5 && $urandom % 8 == 0 && (m % 16) < 10 && (m % 16) > 0) begin
          // a second edge in the same clock period: dropped by the TDC
          m2 = m + 3;
          target = t_e0 + time'(m2 * BIN) - time'(BIN / 2);
          #(target - $time);
          din[c] = ~din[c];
          m = m2;
        end
      end
    end
  end

  // ---------------- monitors ----------------
  always @(posedge clk_ph[0]) if (!rst) begin
    if (hb_overflow_any) n_ovf++;
    if (hit_lost_any) n_lost_hit++;
    if (stall_any) n_stall++;
    if (delete_any) n_del++;
    if (match_any) n_match++;
    if (out_valid && !out_ready) n_hold++;
    if (trig_lost) begin
      // the most recent trigger was not accepted
      n_tlost++;
      void'(trig_t_q.pop_back()); void'(lat_q.pop_back()); void'(wid_q.pop_back());
      void'(lead_q.pop_back()); void'(trail_q.pop_back());
    end
    if (out_valid && out_ready) begin
      ev_words.push_back(out_data);
      if (out_data[31:29] == 3'b101) check_event();
    end
  end
  always @(negedge clk_ph[0]) out_ready = !link_block && ($urandom % 4 != 0);

  task automatic check_event();
    logic [31:0] expq [$];
    longint tt, ws, we;
    int base;
    checks++;
    if (trig_t_q.size() == 0) begin
      failures++; $display("event without trigger"); ev_words.delete(); return;
    end
    tt = trig_t_q.pop_front();
    ws = tt - lat_q.pop_front();
    we = ws + wid_q.pop_front();
    void'(lead_q.pop_front()); void'(trail_q.pop_front());
    expq.push_back({3'b100, 12'(n_events), 1'b0, time_t'(tt)});
    for (int b = 0; b < 16; b++) begin
      base = expq.size();
      expq.push_back({3'b001, 4'(b), 12'(n_events), 13'd0});
      for (int c = 8 * b; c < 8 * b + 8; c++)
        foreach (hits[c][i])
          if (hits[c][i].t >= ws && hits[c][i].t < we)
            expq.push_back({3'b000, 7'(c), hits[c][i].leading, 5'd0, time_t'(hits[c][i].t)});
      expq.push_back({3'b010, 4'(b), 12'(n_events), 13'(expq.size() - base - 1)});
    end
    expq.push_back({3'b101, 12'(n_events), 17'(expq.size() + 1)});
    if (ev_words.size() != expq.size()) begin
      failures++; $display("event %0d: %0d words, expected %0d, trigger at %0d", n_events, ev_words.size(), expq.size(), tt);

    end else begin
      foreach (expq[i]) if (ev_words[i] != expq[i]) begin
        failures++; $display("event %0d word %0d: %h expected %h", n_events, i, ev_words[i], expq[i]); break;
      end
      foreach (ev_words[i]) if (ev_words[i][31:29] == 3'b000) begin
        if (ev_words[i][21]) n_lead++; else n_trail++;
        if (ev_words[i][1:0] == 2'b00) n_border++;
      end
    end
    ev_words.delete();
    n_events++;
  endtask

  // one trigger pulse; its rising edge lies in the middle of a clock period
  task automatic send_trigger();
    time target;
    longint k;
    k = cur_period() + 2;
    target = t_e0 + time'(k * P) + time'(P / 4 + $urandom % (P / 2));
    #(target - $time);
    trig_in = 1;
    trig_t_q.push_back(16 * (k + 1));
    lat_q.push_back(latency); wid_q.push_back(width);
    lead_q.push_back(lead_en); trail_q.push_back(trail_en);
    if (n_sent > 0 && 16 * (k + 1) - last_trig_t < longint'(width)) n_overlap++;
    last_trig_t = 16 * (k + 1);
    n_sent++;
    #(2 * P) trig_in = 0;
    #(2 * P);
  endtask

  task automatic wait_periods(int n);
    repeat (n) @(posedge clk_ph[0]);
  endtask

  task automatic drain();
    int guard = 0;
    while ((trig_t_q.size() > 0) && guard < 40000) begin @(posedge clk_ph[0]); guard++; end
    checks++;
    if (trig_t_q.size() != 0) begin failures++; $display("%0d events never arrived", trig_t_q.size()); end
  endtask

  // forget edges older than every window still to be checked
  task automatic prune();
    longint lim;
    lim = (trig_t_q.size() > 0) ? trig_t_q[0] - longint'(lat_q[0]) - 64 : 16 * cur_period() - 14000;
    for (int c = 0; c < 128; c++)
      while (hits[c].size() > 0 && hits[c][0].t < lim) void'(hits[c].pop_front());
  endtask

  // keep the edge lists short and free of time stamps that have wrapped
  initial begin
    wait (running);
    forever begin
      wait_periods(256);
      prune();
    end
  end

  initial begin
    repeat (4) @(posedge clk_ph[0]);
    t_e0 = $time;
    rst <= 0;
    running = 1;
    wait_periods(150);
    // A: both edges
    for (int i = 0; i < 16; i++) begin
      send_trigger();
      if (i % 4 == 3) wait_periods(2); else wait_periods(60 + $urandom % 200);
      prune();
    end
    drain();
    // B: leading edges only
    lead_en = 1; trail_en = 0;
    wait_periods(200);
    for (int i = 0; i < 4; i++) begin send_trigger(); wait_periods(50 + $urandom % 100); end
    drain();
    n_lead_only = n_trail;
    // C: trailing edges only
    lead_en = 0; trail_en = 1;
    wait_periods(200);
    for (int i = 0; i < 4; i++) begin send_trigger(); wait_periods(50 + $urandom % 100); end
    drain();
    n_trail_only = n_lead;
    lead_en = 1; trail_en = 1;
    wait_periods(200);
    prune();
    // D: trigger burst with a window reaching past the trigger, link blocked
    quiet = 1;
    latency = 16'd100; width = 16'd1400;
    link_block = 1;
    wait_periods(100);
    for (int i = 0; i < 24; i++) send_trigger();
    wait_periods(300);
    link_block = 0;
    drain();
    quiet = 0;
    latency = 16'd800; width = 16'd600;
    wait_periods(100);
    prune();
    // E: hit buffer overflow on channel 7, no triggers
    latency = 16'd12000;
    burst7 = 1;
    wait_periods(700);
    burst7 = 0;
    latency = 16'd800;
    wait_periods(1400);
    prune();
    for (int i = 0; i < 4; i++) begin send_trigger(); wait_periods(100 + $urandom % 100); end
    drain();

    $display("events %0d sent %0d: leading %0d trailing %0d at partition borders %0d overlapping %0d",
             n_events, n_sent, n_lead, n_trail, n_border, n_overlap);
    $display("second edge dropped %0d, hit buffer overflow %0d, triggers lost %0d, matching stalled %0d, link held %0d, deletions %0d, matches %0d",
             n_lost_hit, n_ovf, n_tlost, n_stall, n_hold, n_del, n_match);
    // each mechanism must have happened
    checks++; if (n_lead == 0)      begin failures++; $display("no leading edge"); end
    checks++; if (n_trail == 0)     begin failures++; $display("no trailing edge"); end
    checks++; if (n_border == 0)    begin failures++; $display("no edge at a partition border"); end
    checks++; if (n_overlap == 0)   begin failures++; $display("no overlapping windows"); end
    checks++; if (n_lost_hit == 0)  begin failures++; $display("no dropped second edge"); end
    checks++; if (n_ovf == 0)       begin failures++; $display("no hit buffer overflow"); end
    checks++; if (n_tlost == 0)     begin failures++; $display("no lost trigger"); end
    checks++; if (n_hold == 0)      begin failures++; $display("link never held"); end
    checks++; if (n_del == 0)       begin failures++; $display("no deletion"); end
    checks++; if (n_match == 0)     begin failures++; $display("no match"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
