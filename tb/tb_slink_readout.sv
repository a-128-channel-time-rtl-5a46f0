// tb_slink_readout: three F1-block S-Link FIFOs modelled as queues are filled with
// events of random length, sometimes late; the readout must send, per event, the event
// header, the words of block 0, 1, 2 (each up to its F1 trailer) and the event trailer
// with the word count, and must hold its word while the link is not ready.
`timescale 1ps/1ps
module tb_slink_readout;
  import tdc_pkg::*;
  localparam int NB = 3;
  logic clk = 0, rst = 1, ev_push = 0, ev_full, out_valid, out_ready = 0;
  trig_t ev_trig;
  logic [NB-1:0] sf_empty, sf_rd_en;
  logic [31:0] sf_rd_data [NB];
  logic [31:0] out_data;
  logic [31:0] q [NB][$];
  logic [31:0] expq [$];
  int checks = 0, failures = 0, n_hold = 0, n_words = 0;
  always #1000 clk = ~clk;
  slink_readout #(.N_BLK(NB), .EV_DEPTH(4)) dut (.clk, .rst, .ev_push, .ev_trig, .ev_full, .sf_empty, .sf_rd_data, .sf_rd_en,
                                                 .out_data, .out_valid, .out_ready);
  initial begin
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  for (genvar b = 0; b < NB; b++) begin : g_q
    assign sf_empty[b]   = q[b].size() == 0;
    assign sf_rd_data[b] = (q[b].size() > 0) ? q[b][0] : 32'h0;
  end
  always @(posedge clk) begin
    for (int b = 0; b < NB; b++) if (sf_rd_en[b]) void'(q[b].pop_front());
    if (out_valid && out_ready) begin
      checks++;
      if (expq.size() == 0 || out_data != expq[0]) begin
        failures++; $display("word %h expected %h", out_data, (expq.size() > 0) ? expq[0] : 32'hx);
      end
      if (expq.size() > 0) void'(expq.pop_front());
      n_words++;
    end
    if (out_valid && !out_ready) n_hold++;
  end
  always @(negedge clk) out_ready = ($urandom % 3 != 0);
  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int e = 0; e < 40; e++) begin
      automatic logic [31:0] blkw [NB][$];
      int total, n;
      trig_t tr;
      tr = '{evt: evt_t'(e), t: time_t'($urandom)};
      total = 2;
      for (int b = 0; b < NB; b++) begin
        n = $urandom % 5;
        blkw[b].push_back({3'b001, 4'(b), 12'(e), 13'd0});
        for (int k = 0; k < n; k++) blkw[b].push_back({3'b000, 29'($urandom)});
        blkw[b].push_back({3'b010, 4'(b), 12'(e), 13'(n)});
        total += n + 2;
      end
      expq.push_back({3'b100, 12'(e), 1'b0, tr.t});
      for (int b = 0; b < NB; b++) foreach (blkw[b][k]) expq.push_back(blkw[b][k]);
      expq.push_back({3'b101, 12'(e), 17'(total)});
      @(negedge clk); ev_push = 1; ev_trig = tr;
      @(negedge clk); ev_push = 0;
      // blocks deliver their data in random order and at random times
      for (int b = NB - 1; b >= 0; b--) begin
        repeat ($urandom % 6) @(negedge clk);
        foreach (blkw[b][k]) q[b].push_back(blkw[b][k]);
      end
      while (expq.size() > 0) @(negedge clk);
    end
    checks++;
    if (n_hold == 0) begin failures++; $display("link never held"); end
    $display("words %0d, held %0d", n_words, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
