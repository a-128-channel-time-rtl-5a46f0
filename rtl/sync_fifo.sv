// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used for the trigger FIFO, the per-channel output FIFOs, the per-F1-block S-Link FIFOs
// and the event FIFO of the readout. The head entry is visible on rd_data whenever
// empty is low; rd_en removes it at the next clock. A write and a read may happen in the
// same clock. Writes into a full FIFO and reads from an empty one are ignored (the
// assertions flag them, as no user of this FIFO is meant to do either).
`timescale 1ps/1ps
module sync_fifo #(
  parameter int unsigned W     = 18,
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty
);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp, count;
  logic         do_wr, do_rd;

  assign count   = wp - rp;
  assign full    = count == (AW+1)'(DEPTH);
  assign empty   = count == '0;
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));

endmodule
