// hit_buffer: hit buffer RAM of one TDC channel.
//
// A circular buffer of DEPTH hits in a block-RAM style array. Hits are written in
// arrival order at wr_ptr. The trigger matching unit owns the read side: it reads any
// address (synchronous read, rd_data valid one clock after rd_addr) and frees entries by
// moving head, the position of the oldest hit still needed. Pointers carry one extra
// bit so that full (wr_ptr - head == DEPTH) and empty (wr_ptr == head) differ. A hit
// that arrives while the buffer is full is dropped and overflow pulses for one clock.
// Storing hits in a block-RAM hit buffer follows the design description; the depth, the
// pointer interface and the overflow rule are this design's own.
`timescale 1ps/1ps
module hit_buffer
  import tdc_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr_en,
  input  hit_t        wr_data,
  input  logic [AW-1:0] rd_addr,
  output hit_t        rd_data,
  input  logic [AW:0] head,
  output logic [AW:0] wr_ptr,
  output logic        overflow
);

  hit_t mem [DEPTH];
  logic full;

  assign full = (wr_ptr - head) == (AW+1)'(DEPTH);

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wr_ptr[AW-1:0]] <= wr_data;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr   <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && full;
      if (wr_en && !full) wr_ptr <= wr_ptr + 1'b1;
    end
  end

endmodule
