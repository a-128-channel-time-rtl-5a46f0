// trigger_matching: trigger matching unit of one TDC channel.
//
// For the trigger at the head of the trigger FIFO (time T) the window is
//     [T - latency, T - latency + width)      (all times in bins, modulo 2^16)
// Once the window has closed (now - window end > WAIT_MARGIN, so every hit that could
// fall into it is already in the hit buffer) the unit walks the hit buffer from its
// oldest entry: hits older than the window start are deleted (head advances), hits in
// the window are copied to the output FIFO, and the first hit at or after the window
// end, or the end of the buffer, closes the event. Matched hits stay in the buffer so
// that a later, overlapping window can use them again. An end-of-event marker (carrying
// T) is then written and done is raised until the trigger leaves the FIFO head; the
// trigger FIFO is popped once every channel is done.
// With no trigger waiting, hits older than now - latency - DEL_MARGIN are deleted; the
// margin covers the few clocks a trigger needs to reach the trigger FIFO.
// A full output FIFO stalls the unit (stall is high); no hit is lost.
//
// Passing only hits in a programmable window around the trigger and deleting hits older
// than the trigger latency follow the design description; the window definition, the
// walk order and the margins are this design's own.
//
// Timing: the hit buffer has a one-clock read; each hit takes two clocks (address,
// evaluate). Hit time stamps of one channel rise strictly, which the walk relies on.
`timescale 1ps/1ps
module trigger_matching
  import tdc_pkg::*;
#(
  parameter int unsigned AW          = 9,
  parameter int unsigned DEL_MARGIN  = 256,
  parameter int unsigned WAIT_MARGIN = 64
) (
  input  logic          clk,
  input  logic          rst,
  input  time_t         latency,
  input  time_t         width,
  input  time_t         now,
  input  logic          trig_valid,
  input  trig_t         trig,
  output logic          done,
  // hit buffer read side
  output logic [AW-1:0] hb_rd_addr,
  input  hit_t          hb_rd_data,
  output logic [AW:0]   hb_head,
  input  logic [AW:0]   hb_wr_ptr,
  // output FIFO write side
  output logic          of_wr_en,
  output ofifo_word_t   of_wr_data,
  input  logic          of_full,
  // activity, for monitoring
  output logic          matched,
  output logic          deleted,
  output logic          stall
);

  typedef enum logic [2:0] {S_IDLE, S_DEL, S_WAIT, S_ISSUE, S_EVAL, S_MARK, S_DONE} state_e;

  state_e       state;
  logic [AW:0]  scan;
  time_t        wstart, wend, tstamp;
  evt_t         last_evt;
  logic         new_trig;
  logic         in_window, too_old, stale;

  assign new_trig  = trig_valid && (trig.evt != last_evt);
  assign done      = trig_valid && (trig.evt == last_evt);
  assign too_old   = tdiff(hb_rd_data.t, wstart) < 0;
  assign in_window = tdiff(hb_rd_data.t, wend) < 0;
  assign stale     = tdiff(hb_rd_data.t, now - latency - TIME_W'(DEL_MARGIN)) < 0;
  assign hb_rd_addr = (state == S_IDLE || state == S_DEL) ? hb_head[AW-1:0] : scan[AW-1:0];

  always_comb begin
    of_wr_en   = 1'b0;
    of_wr_data = '0;
    matched    = 1'b0;
    deleted    = 1'b0;
    stall      = 1'b0;
    case (state)
      S_DEL:  deleted = stale;
      S_EVAL: begin
        if (too_old) deleted = 1'b1;
        else if (in_window) begin
          stall = of_full;
          if (!of_full) begin
            of_wr_en   = 1'b1;
            of_wr_data = '{marker: 1'b0, leading: hb_rd_data.leading, t: hb_rd_data.t};
            matched    = 1'b1;
          end
        end
      end
      S_MARK: begin
        stall = of_full;
        if (!of_full) begin
          of_wr_en   = 1'b1;
          of_wr_data = '{marker: 1'b1, leading: 1'b0, t: tstamp};
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      hb_head  <= '0;
      scan     <= '0;
      wstart   <= '0;
      wend     <= '0;
      tstamp   <= '0;
      last_evt <= '1;
    end else begin
      case (state)
        S_IDLE: begin
          if (new_trig) begin
            wstart <= trig.t - latency;
            wend   <= trig.t - latency + width;
            tstamp <= trig.t;
            scan   <= hb_head;
            state  <= S_WAIT;
          end else if (hb_wr_ptr != hb_head) begin
            state <= S_DEL;
          end
        end
        S_DEL: begin
          if (stale) hb_head <= hb_head + 1'b1;
          state <= S_IDLE;
        end
        S_WAIT: if (tdiff(now, wend) > $signed(TIME_W'(WAIT_MARGIN))) state <= S_ISSUE;
        S_ISSUE: state <= (scan == hb_wr_ptr) ? S_MARK : S_EVAL;
        S_EVAL: begin
          if (too_old) begin
            hb_head <= hb_head + 1'b1;
            scan    <= scan + 1'b1;
            state   <= S_ISSUE;
          end else if (in_window) begin
            if (!of_full) begin
              scan  <= scan + 1'b1;
              state <= S_ISSUE;
            end
          end else begin
            state <= S_MARK;
          end
        end
        S_MARK: if (!of_full) begin
          last_evt <= trig.evt;
          state    <= S_DONE;
        end
        S_DONE: if (!done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // the walk never passes the write pointer, and head never passes scan while matching
  a_scan_in_range: assert property (@(posedge clk) disable iff (rst)
                                    (hb_wr_ptr - hb_head) <= (AW+1)'(2**AW));

endmodule
