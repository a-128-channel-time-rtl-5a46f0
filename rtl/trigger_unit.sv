// trigger_unit: trigger time stamping and trigger FIFO.
//
// The asynchronous trigger input passes a two-flip-flop synchroniser; a third flip-flop
// finds its rising edge. The trigger is time-stamped with clock-period precision: its
// time is 16 x the coarse count of the clock edge that first sampled it (fine part 0),
// in the same time base as the hit time stamps. Accepted triggers are numbered from 0
// after reset and stored as {event number, time} in the trigger FIFO, whose head is
// offered to all trigger matching units; trig_pop removes it. A trigger that finds the
// FIFO full is dropped and trig_lost pulses. Time stamping with clock-period precision
// and the trigger FIFO follow the design description; the synchroniser, the numbering
// and the FIFO depth are this design's choices.
//
// Timing: a trigger edge sampled on clock edge m is in the FIFO after edge m+3.
`timescale 1ps/1ps
module trigger_unit
  import tdc_pkg::*;
#(
  parameter int unsigned TRIG_DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  trig_in,
  output logic  trig_valid,
  output trig_t trig,
  input  logic  trig_pop,
  output logic  trig_lost
);

  logic [COARSE_W-1:0] count;
  logic                s1, s2, s3, rise, full, empty;
  evt_t                evt;
  trig_t               new_trig;

  clock_counter #(.W(COARSE_W)) u_cnt (.clk, .rst, .count);

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= 1'b0; s2 <= 1'b0; s3 <= 1'b0;
    end else begin
      s1 <= trig_in; s2 <= s1; s3 <= s2;
    end
  end

  assign rise       = s2 && !s3;
  // s1 took the edge one clock before the current count
  assign new_trig.t   = {count - COARSE_W'(1), FINE_W'(0)};
  assign new_trig.evt = evt;

  always_ff @(posedge clk) begin
    if (rst) begin
      evt       <= '0;
      trig_lost <= 1'b0;
    end else begin
      trig_lost <= rise && full;
      if (rise && !full) evt <= evt + 1'b1;
    end
  end

  sync_fifo #(.W($bits(trig_t)), .DEPTH(TRIG_DEPTH)) u_fifo (
    .clk, .rst,
    .wr_en(rise && !full), .wr_data(new_trig), .full,
    .rd_en(trig_pop), .rd_data(trig), .empty
  );

  assign trig_valid = !empty;

endmodule
