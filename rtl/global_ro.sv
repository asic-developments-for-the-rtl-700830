// global_ro: the Global Readout Unit: it gathers the hits of the eight regions into the
// 64-cell global buffer and sends them off the chip in frames over one or two serial links.
//
// The buffer is split into two queues of FIFO_DEPTH/2 cells, one for hits of even and one
// for hits of odd frame numbers (bit 0 of the frame tag). A round-robin arbiter takes at
// most one hit per clock from the regions whose readout FIFO is not empty and whose head
// has room in its queue, starting after the region served last; a full queue
// back-pressures only the regions whose next hit belongs to it. The frame builder reads
// the queue of the frame it is sending (parity of tx_frame). So hits of the next frame,
// which start to arrive before the current frame can be closed, wait in the other queue
// and do not block late hits of the current frame behind them. The transmitter asks the
// frame builder for a word every 32 cycles per active link.
// srst clears everything; tx_rst clears only the frame builder and the transmitter (the
// short RstSync command), keeping the hits already buffered. fifo_full is high while
// either queue is full.
// The 64 buffer cells, the two 200 Mb/s links and the frame format are the chip's; the
// split into two parity queues and the arbitration scheme are this design's choices.
module global_ro
  import amber_pkg::*;
#(
  parameter int FIFO_DEPTH = 64,
  parameter int GUARD      = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                srst,
  input  logic                tx_rst,
  input  logic [CHIPID_W-1:0] chip_id,
  input  logic                two_links,
  input  logic [TS_W-1:0]     ts,
  input  logic [FRAME_W-1:0]  frame_now,
  input  logic [N_REGIONS-1:0] reg_valid,
  input  tagged_hit_t         reg_data [N_REGIONS],
  output logic [N_REGIONS-1:0] reg_ready,
  output logic [1:0]          link,
  // monitoring
  output logic                fifo_full,
  output logic                sent_header,
  output logic                sent_trailer,
  output logic                sent_sync,
  output logic                sent_data,
  output logic                late_drop
);
  localparam int RW = $clog2(N_REGIONS);
  localparam int QDEPTH = FIFO_DEPTH / 2;   // cells per frame-parity queue

  logic [RW-1:0] last, pick;
  logic          pick_any;
  logic [1:0]    q_push, q_pop, q_empty, q_full;
  tagged_hit_t   q_head [2];
  tagged_hit_t   head;
  logic          pop, req, par;
  logic [FRAME_W-1:0] tx_frame;
  logic [31:0]   word;
  logic [N_REGIONS-1:0] elig;

  // a region may be served when the queue of its head's frame parity has room
  always_comb
    for (int r = 0; r < N_REGIONS; r++)
      elig[r] = reg_valid[r] && !q_full[reg_data[r].frame[0]];

  always_comb begin
    pick_any = 1'b0;
    pick     = '0;
    for (int k = 1; k <= N_REGIONS; k++) begin
      logic [RW-1:0] idx;
      idx = last + RW'(k);
      if (!pick_any && elig[idx]) begin
        pick_any = 1'b1;
        pick     = idx;
      end
    end
  end

  always_comb begin
    reg_ready = '0;
    if (pick_any) reg_ready[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        last <= RW'(N_REGIONS - 1);
    else if (srst)     last <= RW'(N_REGIONS - 1);
    else if (pick_any) last <= pick;
  end

  // two queues, one per frame parity; the frame builder reads the one of the frame it sends
  assign par = tx_frame[0];
  always_comb begin
    q_push = '0;
    q_pop  = '0;
    if (pick_any) q_push[reg_data[pick].frame[0]] = 1'b1;
    q_pop[par] = pop;
  end
  assign head      = q_head[par];
  assign fifo_full = |q_full;

  for (genvar p = 0; p < 2; p++) begin : g_q
    sync_fifo #(.T(tagged_hit_t), .DEPTH(QDEPTH)) u_fifo (
      .clk, .rst_n, .srst,
      .push(q_push[p]), .din(reg_data[pick]),
      .pop(q_pop[p]), .dout(q_head[p]),
      .empty(q_empty[p]), .full(q_full[p]), .count()
    );
  end

  frame_builder #(.GUARD(GUARD)) u_fb (
    .clk, .rst_n, .srst(srst || tx_rst),
    .chip_id, .ts, .frame_now,
    .head_valid(!q_empty[par]), .head, .pop,
    .req, .word, .tx_frame,
    .sent_header, .sent_trailer, .sent_sync, .sent_data, .late_drop
  );

  tx_unit u_tx (
    .clk, .rst_n, .srst(srst || tx_rst),
    .two_links, .req, .word, .link
  );
endmodule
