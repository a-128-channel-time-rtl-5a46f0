// tb_sync_fifo: random pushes and pops against a queue model; checks head, empty, full
// and that a full FIFO really holds DEPTH entries.
`timescale 1ps/1ps
module tb_sync_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst = 1;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [17:0] wr_data = '0, rd_data;
  logic [17:0] model [$];
  int checks = 0, failures = 0;
  always #1000 clk = ~clk;
  sync_fifo #(.W(18), .DEPTH(DEPTH)) dut (.clk, .rst, .wr_en, .wr_data, .full, .rd_en, .rd_data, .empty);
  initial begin
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int nfull = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0)) begin failures++; $display("empty flag wrong at %0d", i); end
      checks++;
      if (full != (model.size() == DEPTH)) begin failures++; $display("full flag wrong at %0d", i); end
      if (model.size() > 0) begin
        checks++;
        if (rd_data != model[0]) begin failures++; $display("head %h expected %h", rd_data, model[0]); end
      end
      if (full) nfull++;
      // phases of mostly-write and mostly-read traffic
      wr_en = ((i / 200) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      rd_en = ((i / 200) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      if (full) wr_en = 0;
      if (empty) rd_en = 0;
      wr_data = 18'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    checks++; if (nfull == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
