// f1_block: eight TDC channels with trigger matching, concentrated into one S-Link FIFO.
//
// Each channel (tdc_channel) has its own trigger matching unit and output FIFO. All
// matching units work on the same head trigger; done is high when all eight have
// finished it. A merger then moves the event into the block's S-Link FIFO as
//     F1 header (block, event) | data words of channel 0 .. 7 | F1 trailer (word count)
// reading each channel's output FIFO up to its end-of-event marker, channel 0 first.
// The merger keeps its own event counter, which stays equal to the trigger numbers
// because every trigger ends with exactly one marker per channel. The S-Link FIFO is
// read by the readout through sf_rd_en / sf_rd_data / sf_empty.
// Eight channels per block, per-channel trigger matching and output FIFOs and the single
// S-Link FIFO follow the block diagram of the design; the word format and the channel
// order are this design's own (see tdc_pkg).
`timescale 1ps/1ps
module f1_block
  import tdc_pkg::*;
#(
  parameter int unsigned BLOCK_ID    = 0,
  parameter int unsigned N_CH        = 8,
  parameter int unsigned HB_DEPTH    = 512,
  parameter int unsigned OUT_DEPTH   = 256,
  parameter int unsigned SLINK_DEPTH = 1024
) (
  input  logic [7:0]      clk_ph,
  input  logic            rst,
  input  logic [N_CH-1:0] din,
  input  logic            lead_en,
  input  logic            trail_en,
  input  time_t           latency,
  input  time_t           width,
  input  logic            trig_valid,
  input  trig_t           trig,
  output logic            done,
  input  logic            sf_rd_en,
  output logic [31:0]     sf_rd_data,
  output logic            sf_empty,
  output logic [N_CH-1:0] hit_valid,
  output logic [N_CH-1:0] hit_lost,
  output logic [N_CH-1:0] hb_overflow,
  output logic [N_CH-1:0] matched,
  output logic [N_CH-1:0] deleted,
  output logic [N_CH-1:0] stall
);

  localparam int unsigned AW  = $clog2(HB_DEPTH);
  localparam int unsigned CHW = $clog2(N_CH);

  logic clk;
  assign clk = clk_ph[0];

  logic        [N_CH-1:0] ch_done, of_empty, of_full, of_rd_en;
  ofifo_word_t            of_rd_data [N_CH];

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    time_t       now;
    logic [AW-1:0] rd_addr;
    hit_t        rd_data;
    logic [AW:0] head, wr_ptr;
    logic        of_wr_en;
    ofifo_word_t of_wr_data;

    tdc_channel #(.HB_DEPTH(HB_DEPTH), .AW(AW)) u_ch (
      .clk_ph, .rst, .din(din[c]), .lead_en, .trail_en, .now,
      .hb_rd_addr(rd_addr), .hb_rd_data(rd_data), .hb_head(head), .hb_wr_ptr(wr_ptr),
      .hit_valid(hit_valid[c]), .hit_lost(hit_lost[c]), .hb_overflow(hb_overflow[c])
    );

    trigger_matching #(.AW(AW)) u_tm (
      .clk, .rst, .latency, .width, .now, .trig_valid, .trig, .done(ch_done[c]),
      .hb_rd_addr(rd_addr), .hb_rd_data(rd_data), .hb_head(head), .hb_wr_ptr(wr_ptr),
      .of_wr_en, .of_wr_data, .of_full(of_full[c]),
      .matched(matched[c]), .deleted(deleted[c]), .stall(stall[c])
    );

    sync_fifo #(.W($bits(ofifo_word_t)), .DEPTH(OUT_DEPTH)) u_of (
      .clk, .rst, .wr_en(of_wr_en), .wr_data(of_wr_data), .full(of_full[c]),
      .rd_en(of_rd_en[c]), .rd_data(of_rd_data[c]), .empty(of_empty[c])
    );
  end

  assign done = &ch_done;

  // ---------------- merger into the S-Link FIFO ----------------
  typedef enum logic [1:0] {M_IDLE, M_HDR, M_CH, M_TRL} mstate_e;

  mstate_e          mstate;
  logic [CHW-1:0]   ch;
  evt_t             evt;
  logic [12:0]      nwords;
  logic             sf_wr_en, sf_full;
  logic [31:0]      sf_wr_data;
  ofifo_word_t      head_w;
  logic [6:0]       gch;

  assign head_w = of_rd_data[ch];
  assign gch    = 7'(BLOCK_ID * N_CH) + 7'(ch);

  always_comb begin
    sf_wr_en   = 1'b0;
    sf_wr_data = '0;
    of_rd_en   = '0;
    case (mstate)
      M_HDR: begin
        sf_wr_en   = !sf_full;
        sf_wr_data = f1_header_word(4'(BLOCK_ID), evt);
      end
      M_CH: if (!of_empty[ch]) begin
        if (head_w.marker) of_rd_en[ch] = 1'b1;
        else if (!sf_full) begin
          sf_wr_en     = 1'b1;
          sf_wr_data   = data_word(gch, '{leading: head_w.leading, t: head_w.t});
          of_rd_en[ch] = 1'b1;
        end
      end
      M_TRL: begin
        sf_wr_en   = !sf_full;
        sf_wr_data = f1_trailer_word(4'(BLOCK_ID), evt, nwords);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mstate <= M_IDLE;
      ch     <= '0;
      evt    <= '0;
      nwords <= '0;
    end else begin
      case (mstate)
        M_IDLE: if (!of_empty[0]) mstate <= M_HDR;
        M_HDR: if (!sf_full) begin
          ch     <= '0;
          nwords <= '0;
          mstate <= M_CH;
        end
        M_CH: if (!of_empty[ch]) begin
          if (head_w.marker) begin
            if (32'(ch) == N_CH - 1) mstate <= M_TRL;
            else                     ch <= ch + 1'b1;
          end else if (!sf_full) begin
            nwords <= nwords + 1'b1;
          end
        end
        M_TRL: if (!sf_full) begin
          evt    <= evt + 1'b1;
          mstate <= M_IDLE;
        end
        default: mstate <= M_IDLE;
      endcase
    end
  end

  sync_fifo #(.W(32), .DEPTH(SLINK_DEPTH)) u_sf (
    .clk, .rst, .wr_en(sf_wr_en), .wr_data(sf_wr_data), .full(sf_full),
    .rd_en(sf_rd_en), .rd_data(sf_rd_data), .empty(sf_empty)
  );

endmodule
