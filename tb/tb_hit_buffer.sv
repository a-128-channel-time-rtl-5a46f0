// tb_hit_buffer: writes hits, reads them back at random addresses (one-clock read),
// frees entries by moving head, and fills the buffer to check that the next hit is
// dropped with an overflow pulse.
`timescale 1ps/1ps
module tb_hit_buffer;
  import tdc_pkg::*;
  localparam int DEPTH = 16, AW = 4;
  logic clk = 0, rst = 1, wr_en = 0, overflow;
  hit_t wr_data = '0, rd_data;
  logic [AW-1:0] rd_addr = '0;
  logic [AW:0] head = '0, wr_ptr;
  hit_t model [DEPTH];
  int checks = 0, failures = 0, written = 0;
  always #1000 clk = ~clk;
  hit_buffer #(.DEPTH(DEPTH), .AW(AW)) dut (.clk, .rst, .wr_en, .wr_data, .rd_addr, .rd_data, .head, .wr_ptr, .overflow);
  initial begin
    #100_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic write(hit_t h, bit expect_drop);
    @(negedge clk); wr_en = 1; wr_data = h;
    @(negedge clk); wr_en = 0;
    checks++;
    if (overflow != expect_drop) begin failures++; $display("overflow %b expected %b", overflow, expect_drop); end
    if (!expect_drop) begin model[written % DEPTH] = h; written++; end
  endtask
  task automatic check_read(int idx);
    @(negedge clk); rd_addr = AW'(idx);
    @(negedge clk);
    checks++;
    if (rd_data != model[idx % DEPTH]) begin failures++; $display("addr %0d: %h expected %h", idx, rd_data, model[idx % DEPTH]); end
  endtask
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int round = 0; round < 6; round++) begin
      // fill to full
      while (((AW+1)'(written) - head) < (AW+1)'(DEPTH))
        write('{leading: 1'($urandom), t: time_t'($urandom)}, 0);
      checks++;
      if (wr_ptr != (AW+1)'(written)) begin failures++; $display("wr_ptr %0d expected %0d", wr_ptr, written); end
      write('{leading: 1'b1, t: 16'hDEAD}, 1);   // full: dropped
      for (int k = 0; k < 8; k++) check_read(int'(head) + ($urandom % DEPTH));
      // free a random number of entries
      head = head + (AW+1)'(1 + $urandom % DEPTH);
      for (int k = 0; k < 4; k++) if ((wr_ptr - head) > (AW+1)'(k)) check_read(int'(head) + k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
