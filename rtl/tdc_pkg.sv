// tdc_pkg: types and constants shared by the 128-channel shifted-clock-sampling TDC.
//
// Time base: one bin is 1/16 of the sampling clock period (160 ps at 388.8 MHz).
// A time stamp is 16 bits wide: 12 bits of coarse clock count and 4 fine bits.
// Comparisons between time stamps are done modulo 2^16 with a signed difference,
// which is correct while the distances involved stay below 2^15 bins (5.2 us).
//
// Output word format (32 bits, bits 31:29 give the type). The format is this design's
// own; it carries the same information as a TDC-F1 style stream:
//   DATA          000 | ch[28:22] | leading[21] | 00000 | time[15:0]
//   F1_HEADER     001 | blk[28:25] | evt[24:13] | 0
//   F1_TRAILER    010 | blk[28:25] | evt[24:13] | data words[12:0]
//   EVENT_HEADER  100 | evt[28:17] | 0 | trigger time[15:0]
//   EVENT_TRAILER 101 | evt[28:17] | words in event incl. header and trailer[16:0]
`timescale 1ps/1ps
package tdc_pkg;

  localparam int unsigned TIME_W   = 16;  // time stamp width in bins
  localparam int unsigned FINE_W   = 4;   // 16 bins per clock period
  localparam int unsigned COARSE_W = TIME_W - FINE_W;
  localparam int unsigned EVT_W    = 12;  // event number width
  localparam int unsigned N_PART   = 4;   // partitions per TDC register
  localparam int unsigned PART_W   = 5;   // samples per partition (borders shared)

  typedef logic [TIME_W-1:0] time_t;
  typedef logic [EVT_W-1:0]  evt_t;

  // One hit as stored in the hit buffer.
  typedef struct packed {
    logic  leading;   // 1: 0->1 transition, 0: 1->0 transition
    time_t t;
  } hit_t;

  // One entry of a channel's output FIFO: a matched hit, or the end-of-event marker.
  typedef struct packed {
    logic  marker;
    logic  leading;
    time_t t;
  } ofifo_word_t;

  // One trigger as held in the trigger FIFO.
  typedef struct packed {
    evt_t  evt;
    time_t t;
  } trig_t;

  typedef enum logic [2:0] {
    W_DATA      = 3'b000,
    W_F1_HEADER = 3'b001,
    W_F1_TRAIL  = 3'b010,
    W_EV_HEADER = 3'b100,
    W_EV_TRAIL  = 3'b101
  } word_type_e;

  // Signed distance a - b in bins, modulo 2^16.
  function automatic logic signed [TIME_W-1:0] tdiff(time_t a, time_t b);
    return signed'(a - b);
  endfunction

  function automatic logic [31:0] data_word(logic [6:0] ch, hit_t h);
    return {W_DATA, ch, h.leading, 5'd0, h.t};
  endfunction

  function automatic logic [31:0] f1_header_word(logic [3:0] blk, evt_t evt);
    return {W_F1_HEADER, blk, evt, 13'd0};
  endfunction

  function automatic logic [31:0] f1_trailer_word(logic [3:0] blk, evt_t evt, logic [12:0] n);
    return {W_F1_TRAIL, blk, evt, n};
  endfunction

  function automatic logic [31:0] ev_header_word(trig_t tr);
    return {W_EV_HEADER, tr.evt, 1'b0, tr.t};
  endfunction

  function automatic logic [31:0] ev_trailer_word(evt_t evt, logic [16:0] n);
    return {W_EV_TRAIL, evt, n};
  endfunction

endpackage
