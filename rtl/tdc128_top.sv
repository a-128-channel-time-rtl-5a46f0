// tdc128_top: 128-channel shifted-clock-sampling TDC with trigger matching and readout.
//
// Sixteen F1-blocks of eight channels each sample their inputs with 16 equidistant
// phases of the clock (eight phase-shifted clocks, both edges), store the hits in
// per-channel hit buffers and, for every trigger, select the hits inside a programmable
// window [T - latency, T - latency + width) into per-channel output FIFOs and one S-Link
// FIFO per block. The trigger unit time-stamps the trigger input and queues it; its head
// is offered to all 128 trigger matching units and popped when every block reports done
// and the readout has room for one more event. The event then passes to the readout,
// which reads the 16 S-Link FIFOs in turn and sends the event as 32-bit words
// (out_data/out_valid/out_ready).
//
// Clocks: clk_ph[k] is the sampling clock delayed by k/16 of its period; clk_ph[0] also
// runs all logic behind the sampling registers. rst is synchronous to clk_ph[0].
// latency and width are in bins (1/16 clock period); lead_en / trail_en select the
// edges. The status outputs pulse for one clock when a hit buffer overflows, a second
// edge in one clock period is dropped, or a trigger finds the trigger FIFO full; the
// activity outputs (any hit found, matched, deleted, matching stalled) ease monitoring.
// The structure (16 F1-blocks of 8 channels, trigger FIFO, trigger matching, S-Link
// FIFOs read consecutively) follows the design description; configuration arriving on
// ports instead of over VME, and the single logic clock, are this design's choices.
`timescale 1ps/1ps
module tdc128_top
  import tdc_pkg::*;
#(
  parameter int unsigned N_BLK       = 16,
  parameter int unsigned N_CH_BLK    = 8,
  parameter int unsigned HB_DEPTH    = 512,
  parameter int unsigned OUT_DEPTH   = 256,
  parameter int unsigned SLINK_DEPTH = 1024,
  parameter int unsigned TRIG_DEPTH  = 16,
  localparam int unsigned N_CH       = N_BLK * N_CH_BLK
) (
  input  logic [7:0]      clk_ph,
  input  logic            rst,
  input  logic [N_CH-1:0] din,
  input  logic            trig_in,
  input  logic            lead_en,
  input  logic            trail_en,
  input  time_t           latency,
  input  time_t           width,
  output logic [31:0]     out_data,
  output logic            out_valid,
  input  logic            out_ready,
  output logic            hb_overflow_any,
  output logic            hit_lost_any,
  output logic            trig_lost,
  output logic            stall_any,
  output logic            hit_any,
  output logic            match_any,
  output logic            delete_any
);

  logic clk;
  assign clk = clk_ph[0];

  logic              trig_valid, trig_pop, ev_full;
  trig_t             trig;
  logic [N_BLK-1:0]  blk_done, sf_empty, sf_rd_en;
  logic [31:0]       sf_rd_data [N_BLK];
  logic [N_CH-1:0]   hit_valid, hit_lost, hb_overflow, matched, deleted, stall;

  trigger_unit #(.TRIG_DEPTH(TRIG_DEPTH)) u_trig (
    .clk, .rst, .trig_in, .trig_valid, .trig, .trig_pop, .trig_lost
  );

  for (genvar b = 0; b < N_BLK; b++) begin : g_blk
    localparam int unsigned LO = b * N_CH_BLK;
    f1_block #(
      .BLOCK_ID(b), .N_CH(N_CH_BLK), .HB_DEPTH(HB_DEPTH),
      .OUT_DEPTH(OUT_DEPTH), .SLINK_DEPTH(SLINK_DEPTH)
    ) u_f1 (
      .clk_ph, .rst, .din(din[LO +: N_CH_BLK]), .lead_en, .trail_en, .latency, .width,
      .trig_valid, .trig, .done(blk_done[b]),
      .sf_rd_en(sf_rd_en[b]), .sf_rd_data(sf_rd_data[b]), .sf_empty(sf_empty[b]),
      .hit_valid(hit_valid[LO +: N_CH_BLK]), .hit_lost(hit_lost[LO +: N_CH_BLK]),
      .hb_overflow(hb_overflow[LO +: N_CH_BLK]), .matched(matched[LO +: N_CH_BLK]),
      .deleted(deleted[LO +: N_CH_BLK]), .stall(stall[LO +: N_CH_BLK])
    );
  end

  assign trig_pop = trig_valid && (&blk_done) && !ev_full;

  slink_readout #(.N_BLK(N_BLK), .EV_DEPTH(TRIG_DEPTH)) u_ro (
    .clk, .rst, .ev_push(trig_pop), .ev_trig(trig), .ev_full,
    .sf_empty, .sf_rd_data, .sf_rd_en,
    .out_data, .out_valid, .out_ready
  );

  assign hb_overflow_any = |hb_overflow;
  assign hit_lost_any    = |hit_lost;
  assign stall_any       = |stall;
  assign hit_any         = |hit_valid;
  assign match_any       = |matched;
  assign delete_any      = |deleted;

endmodule
