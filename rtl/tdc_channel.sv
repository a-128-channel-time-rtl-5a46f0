// tdc_channel: one shifted-clock-sampling TDC channel up to its hit buffer.
//
// din is sampled 16 times per clock period (tdc_register), the samples are read in four
// partitions into the clk_ph[0] domain (partition_sync), searched for edges (hit_finder)
// and the hits are written into the channel's hit buffer RAM. The channel's own clock
// counter gives the coarse time. The read side of the hit buffer is brought out for the
// trigger matching unit, together with now, the time (in bins, fine bits 0) of the clock
// period the hit finder is looking at; every hit with an earlier time is already in the buffer or
// one clock from it. This split into blocks follows the block diagram of the design.
//
// Timing: an edge in clock period n (counted from the last reset clock) gets the time
// 16*n + bin and is written into the hit buffer at clk_ph[0] edge n+4.
`timescale 1ps/1ps
module tdc_channel
  import tdc_pkg::*;
#(
  parameter int unsigned HB_DEPTH = 512,
  parameter int unsigned AW       = $clog2(HB_DEPTH)
) (
  input  logic [7:0]    clk_ph,
  input  logic          rst,
  input  logic          din,
  input  logic          lead_en,
  input  logic          trail_en,
  output time_t         now,
  input  logic [AW-1:0] hb_rd_addr,
  output hit_t          hb_rd_data,
  input  logic [AW:0]   hb_head,
  output logic [AW:0]   hb_wr_ptr,
  output logic          hit_valid,
  output logic          hit_lost,
  output logic          hb_overflow
);

  logic                clk;
  logic [7:0]          q_rise, q_fall;
  logic [PART_W-1:0]   part [N_PART];
  logic [COARSE_W-1:0] count, coarse;
  hit_t                hit;

  assign clk = clk_ph[0];

  tdc_register u_reg (.clk_ph, .din, .q_rise, .q_fall);

  partition_sync u_sync (
    .clk_ph0(clk_ph[0]), .clk_ph2(clk_ph[2]), .clk_ph4(clk_ph[4]), .q_rise, .q_fall, .part
  );

  clock_counter #(.W(COARSE_W)) u_cnt (.clk, .rst, .count);

  // part shows the period sampled two clocks before the current count
  assign coarse = count - COARSE_W'(2);
  assign now    = {coarse, FINE_W'(0)};

  hit_finder u_find (
    .clk, .rst, .lead_en, .trail_en, .part, .coarse,
    .hit_valid, .hit, .hit_lost
  );

  hit_buffer #(.DEPTH(HB_DEPTH), .AW(AW)) u_hb (
    .clk, .rst,
    .wr_en(hit_valid), .wr_data(hit),
    .rd_addr(hb_rd_addr), .rd_data(hb_rd_data),
    .head(hb_head), .wr_ptr(hb_wr_ptr),
    .overflow(hb_overflow)
  );

endmodule
