// frame_builder: turns the stream of frame-tagged hits into the chip's continuous stream
// of 32-bit output words.
//
// Readout is trigger-less and hits leave the chip in the order they reach the global
// FIFO, not in time order. Order is restored only at frame level: a frame is one full
// cycle of the 12-bit time stamp counter, and every hit is sent inside the frame its
// leading edge belongs to. For frame number F the stream is
//   header  {1, 010, ChipId[6:0], 13'b0, F[7:0]}
//   data    {0, Region[2:0], Channel[2:0], Le[11:0], Pk[5:0], Te[6:0]}   (any number)
//   sync    {1, 000, 1100 1100 1100 1100 1100 1100 1111} whenever there is nothing to send
//   trailer {1, 101, DataCnt[11:0], CRC[15:0]}
// A word is produced each time the transmitter asks for one (req); word is valid in the
// same cycle and the internal state moves on at the clock edge.
//
// Closing a frame: hits of frame F can still be on their way (in a channel or a region
// FIFO) after the time stamp counter has started frame F+1. Frame F is closed, i.e. its
// trailer is sent, once the FIFO head is not a hit of frame F and the counter has run at
// least GUARD cycles into frame F+1 (or is further on). A hit of frame F that reaches the
// FIFO head after that (a pulse still open GUARD cycles into the next frame) is dropped
// without being sent (late pulse). The head presented here must be the oldest hit of the
// frame being sent: the global unit keeps hits of consecutive frames in separate queues
// and selects one with tx_frame, so hits of frame F+1 do not hide those of frame F.
// DataCnt counts the data words of the frame; the CRC is CRC-16-CCITT (0x1021, preset
// 0xFFFF) over the header and data words, most significant bit first.
//
// The word formats, the frame as one counter cycle and the contents of header and trailer
// are the chip's; the closing rule, GUARD, the CRC polynomial and its coverage are this
// design's own choices.
module frame_builder
  import amber_pkg::*;
#(
  parameter int GUARD = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                srst,
  input  logic [CHIPID_W-1:0] chip_id,
  input  logic [TS_W-1:0]     ts,
  input  logic [FRAME_W-1:0]  frame_now,
  // global FIFO head (show-ahead)
  input  logic                head_valid,
  input  tagged_hit_t         head,
  output logic                pop,
  // transmitter side
  input  logic                req,
  output logic [31:0]         word,
  output logic [FRAME_W-1:0]  tx_frame,   // number of the frame being sent
  // monitoring pulses
  output logic                sent_header,
  output logic                sent_trailer,
  output logic                sent_sync,
  output logic                sent_data,
  output logic                late_drop
);
  typedef enum logic {F_HEADER, F_BODY} fstate_e;
  fstate_e             state;
  logic [FRAME_W-1:0]  frame_tx;
  logic [CNT_W-1:0]    data_cnt;
  logic [15:0]         crc;

  logic head_cur, head_late, closable;
  logic [FRAME_W-1:0] fdist;

  assign head_cur  = head_valid && (head.frame == frame_tx);
  assign head_late = head_valid && frame_older(head.frame, frame_tx);
  assign fdist     = frame_now - frame_tx;
  assign closable  = !head_cur && !fdist[FRAME_W-1] &&
                     ((fdist >= 2) || (fdist == 1 && int'(ts) >= GUARD));

  logic [31:0] hdr_word, trl_word, data_word, sync_word;
  assign hdr_word  = {1'b1, HDR2_HEADER, chip_id, 13'b0, frame_tx};
  assign trl_word  = {1'b1, HDR2_TRAILER, data_cnt, crc};
  assign data_word = {1'b0, head.hit};
  assign sync_word = {1'b1, HDR2_SYNC, SYNC_PAYLOAD};

  always_comb begin
    sent_header  = 1'b0;
    sent_trailer = 1'b0;
    sent_sync    = 1'b0;
    sent_data    = 1'b0;
    word         = sync_word;
    if (req) begin
      if (state == F_HEADER) begin
        word = hdr_word;  sent_header = 1'b1;
      end else if (head_cur) begin
        word = data_word; sent_data = 1'b1;
      end else if (closable) begin
        word = trl_word;  sent_trailer = 1'b1;
      end else begin
        word = sync_word; sent_sync = 1'b1;
      end
    end
  end

  assign tx_frame  = frame_tx;
  assign late_drop = head_late;
  assign pop       = sent_data || head_late;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= F_HEADER;
      frame_tx <= '0;
      data_cnt <= '0;
      crc      <= 16'hFFFF;
    end else if (srst) begin
      state    <= F_HEADER;
      frame_tx <= '0;
      data_cnt <= '0;
      crc      <= 16'hFFFF;
    end else begin
      if (sent_header) begin
        state    <= F_BODY;
        data_cnt <= '0;
        crc      <= crc16_word(16'hFFFF, hdr_word);
      end
      if (sent_data) begin
        data_cnt <= data_cnt + 1'b1;
        crc      <= crc16_word(crc, data_word);
      end
      if (sent_trailer) begin
        state    <= F_HEADER;
        frame_tx <= frame_tx + 1'b1;
      end
    end
  end

  a_pop_needs_data: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);
endmodule
