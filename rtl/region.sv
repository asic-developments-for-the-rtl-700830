// region: eight channels and their Region Control Unit (readout unit and configuration
// unit).
//
// Readout: every cycle a round-robin arbiter picks one channel with data_valid, starting
// after the channel served last, provided the region FIFO has room. The picked
// channel's three time stamps become one data word: the leading edge le is kept in full
// (12 bits), the peak and trailing edge are sent as their distance from le in clock
// cycles, saturated to 6 bits (Pk) and 7 bits (Te). The word is tagged with the frame its
// leading edge belongs to: the current frame if le <= ts, the previous one otherwise
// (the counter has wrapped since the leading edge). The word goes into a FIFO_DEPTH-deep
// FIFO and the channel gets rd_ack in the same cycle, so it is free again one cycle
// later. The FIFO output is a valid/ready stream to the global readout unit.
//
// Configuration: the control unit's register bus (cfg_req) addresses a channel register
// (Config 0 or 1 of channel c) or one of N_RCR region registers. Writes take effect at
// the next clock edge; rdata returns the addressed register combinationally whenever
// the request names this region.
//
// The eight channels per region, the region FIFO and configuration unit follow the
// chip's architecture. The arbitration, the FIFO depth, the Pk/Te encoding as
// differences, the number of region registers and the frame tagging are this design's.
// The region field of out_data is the constant REGION_ID, so those bits synthesise to
// constants.
module region
  import amber_pkg::*;
#(
  parameter logic [2:0] REGION_ID  = 3'd0,
  parameter int         FIFO_DEPTH = 8,
  parameter int         N_RCR      = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      srst,
  input  logic [TS_W-1:0]           ts,
  input  logic [FRAME_W-1:0]        frame_now,
  input  logic [CH_PER_REGION-1:0]  out_t,
  input  logic [CH_PER_REGION-1:0]  out_e,
  input  logic [CH_PER_REGION-1:0]  peak,
  // register access
  input  cfg_req_t                  cfg_req,
  output logic [CFG_W-1:0]          rdata,
  output ch_cfg_t                   ch_cfg [CH_PER_REGION],
  output logic [CFG_W-1:0]          rcr    [N_RCR],
  // readout stream
  output logic                      out_valid,
  output tagged_hit_t               out_data,
  input  logic                      out_ready,
  // monitoring
  output logic                      fifo_full,
  output logic [CH_PER_REGION-1:0]  hit_lost,
  output logic [CH_PER_REGION-1:0]  hit_discard
);
  localparam int CW = $clog2(CH_PER_REGION);

  logic [CH_PER_REGION-1:0] ch_valid, ch_ack;
  logic [TS_W-1:0]          ch_le [CH_PER_REGION];
  logic [TS_W-1:0]          ch_pk [CH_PER_REGION];
  logic [TS_W-1:0]          ch_te [CH_PER_REGION];
  logic [CFG_W-1:0]         ch_cfg0 [CH_PER_REGION];
  logic [CFG_W-1:0]         ch_cfg1 [CH_PER_REGION];

  logic this_region;
  assign this_region = (cfg_req.region == REGION_ID);

  for (genvar c = 0; c < CH_PER_REGION; c++) begin : g_ch
    logic [1:0] we;
    assign we[0] = cfg_req.we && this_region && cfg_req.kind == REG_CHANNEL &&
                   cfg_req.channel == 3'(c) && cfg_req.addr[0] == 1'b0;
    assign we[1] = cfg_req.we && this_region && cfg_req.kind == REG_CHANNEL &&
                   cfg_req.channel == 3'(c) && cfg_req.addr[0] == 1'b1;
    channel u_ch (
      .clk, .rst_n, .srst, .ts,
      .out_t(out_t[c]), .out_e(out_e[c]), .peak(peak[c]),
      .cfg_we(we), .cfg_wdata(cfg_req.wdata),
      .cfg0(ch_cfg0[c]), .cfg1(ch_cfg1[c]), .cfg(ch_cfg[c]),
      .data_valid(ch_valid[c]), .le(ch_le[c]), .pk(ch_pk[c]), .te(ch_te[c]),
      .rd_ack(ch_ack[c]),
      .hit_lost(hit_lost[c]), .hit_discard(hit_discard[c])
    );
  end

  // ---------------- region configuration registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_RCR; i++) rcr[i] <= '0;
    end else if (srst) begin
      for (int i = 0; i < N_RCR; i++) rcr[i] <= '0;
    end else if (cfg_req.we && this_region && cfg_req.kind == REG_REGION &&
                 int'(cfg_req.addr[3:0]) < N_RCR) begin
      rcr[cfg_req.addr[3:0]] <= cfg_req.wdata;
    end
  end

  always_comb begin
    rdata = '0;
    if (this_region) begin
      if (cfg_req.kind == REG_CHANNEL)
        rdata = cfg_req.addr[0] ? ch_cfg1[cfg_req.channel] : ch_cfg0[cfg_req.channel];
      else if (cfg_req.kind == REG_REGION && int'(cfg_req.addr[3:0]) < N_RCR)
        rdata = rcr[cfg_req.addr[3:0]];
    end
  end

  // ---------------- readout unit ----------------
  logic [CW-1:0]   last;      // channel served last
  logic            pick_any;
  logic [CW-1:0]   pick;
  logic            push;
  tagged_hit_t     word;
  logic            fifo_empty;

  always_comb begin
    pick_any = 1'b0;
    pick     = '0;
    for (int k = 1; k <= CH_PER_REGION; k++) begin
      logic [CW-1:0] idx;
      idx = last + CW'(k);
      if (!pick_any && ch_valid[idx]) begin
        pick_any = 1'b1;
        pick     = idx;
      end
    end
  end

  function automatic logic [TS_W-1:0] sat_diff(logic [TS_W-1:0] a, logic [TS_W-1:0] b, int max);
    logic [TS_W-1:0] d;
    d = a - b;
    return (int'(d) > max) ? TS_W'(max) : d;
  endfunction

  always_comb begin
    logic [TS_W-1:0] dpk, dte;
    dpk = sat_diff(ch_pk[pick], ch_le[pick], (1 << PK_W) - 1);
    dte = sat_diff(ch_te[pick], ch_le[pick], (1 << TE_W) - 1);
    word.hit.region  = REGION_ID;
    word.hit.channel = 3'(pick);
    word.hit.le      = ch_le[pick];
    word.hit.pk      = dpk[PK_W-1:0];
    word.hit.te      = dte[TE_W-1:0];
    word.frame       = (ch_le[pick] <= ts) ? frame_now : frame_now - 1'b1;
  end

  assign push = pick_any && !fifo_full;

  always_comb begin
    ch_ack = '0;
    if (push) ch_ack[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     last <= CW'(CH_PER_REGION - 1);
    else if (srst)  last <= CW'(CH_PER_REGION - 1);
    else if (push)  last <= pick;
  end

  sync_fifo #(.T(tagged_hit_t), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .srst,
    .push, .din(word),
    .pop(out_valid && out_ready), .dout(out_data),
    .empty(fifo_empty), .full(fifo_full), .count()
  );
  assign out_valid = !fifo_empty;
endmodule
