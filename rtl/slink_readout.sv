// slink_readout: event builder that sends the data of all F1-blocks to the DAQ link.
//
// For every trigger the top pushes {event number, trigger time} into the event FIFO
// when the trigger leaves the trigger FIFO; ev_full tells the top to hold the trigger
// FIFO while the event FIFO has no room. For each such event the readout sends
//     event header | S-Link FIFO of F1-block 0 up to its F1 trailer | ... block N_BLK-1
//     | event trailer (number of words in the event, header and trailer included)
// over a 32-bit valid/ready word stream; out_ready low (link full) holds the word. The
// S-Link FIFOs are read one after the other, as the design description gives; the
// event header/trailer words and the valid/ready stream standing in for the S-Link card
// are this design's own.
`timescale 1ps/1ps
module slink_readout
  import tdc_pkg::*;
#(
  parameter int unsigned N_BLK    = 16,
  parameter int unsigned EV_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ev_push,
  input  trig_t             ev_trig,
  output logic              ev_full,
  input  logic [N_BLK-1:0]  sf_empty,
  input  logic [31:0]       sf_rd_data [N_BLK],
  output logic [N_BLK-1:0]  sf_rd_en,
  output logic [31:0]       out_data,
  output logic              out_valid,
  input  logic              out_ready
);

  localparam int unsigned BW = (N_BLK > 1) ? $clog2(N_BLK) : 1;

  typedef enum logic [1:0] {R_IDLE, R_HDR, R_BLK, R_TRL} rstate_e;

  rstate_e        state;
  logic [BW-1:0]  blk;
  logic [16:0]    nwords;
  logic           ev_empty, ev_pop, take;
  trig_t          ev_head;
  logic [31:0]    blk_word;

  sync_fifo #(.W($bits(trig_t)), .DEPTH(EV_DEPTH)) u_ev (
    .clk, .rst, .wr_en(ev_push), .wr_data(ev_trig), .full(ev_full),
    .rd_en(ev_pop), .rd_data(ev_head), .empty(ev_empty)
  );

  assign blk_word = sf_rd_data[blk];
  assign take     = out_valid && out_ready;

  always_comb begin
    out_valid = 1'b0;
    out_data  = '0;
    sf_rd_en  = '0;
    ev_pop    = 1'b0;
    case (state)
      R_HDR: begin
        out_valid = 1'b1;
        out_data  = ev_header_word(ev_head);
      end
      R_BLK: begin
        out_valid     = !sf_empty[blk];
        out_data      = blk_word;
        sf_rd_en[blk] = take;
      end
      R_TRL: begin
        out_valid = 1'b1;
        out_data  = ev_trailer_word(ev_head.evt, nwords + 1'b1);
        ev_pop    = take;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= R_IDLE;
      blk    <= '0;
      nwords <= '0;
    end else begin
      if (take) nwords <= nwords + 1'b1;
      case (state)
        R_IDLE: if (!ev_empty) begin
          nwords <= '0;
          state  <= R_HDR;
        end
        R_HDR: if (take) begin
          blk   <= '0;
          state <= R_BLK;
        end
        R_BLK: if (take && blk_word[31:29] == W_F1_TRAIL) begin
          if (32'(blk) == N_BLK - 1) state <= R_TRL;
          else                       blk   <= blk + 1'b1;
        end
        R_TRL: if (take) state <= R_IDLE;
        default: state <= R_IDLE;
      endcase
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (rst)
                           out_valid && !out_ready |=> out_valid && $stable(out_data));
  a_ev_room: assert property (@(posedge clk) disable iff (rst) !(ev_push && ev_full));

endmodule
