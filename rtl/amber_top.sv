// amber_top: digital back-end of the 64-channel AMBER MicroMegas readout ASIC.
//
// Each of the 64 analog channels reports a hit as three comparator-like signals:
// out_t (timing threshold), out_e (validation threshold) and peak (peak detector). The
// back-end time-stamps the leading edge, the peak and the trailing edge of the timing
// discriminator with a common 12-bit time stamp counter at 200 MHz, keeps validated hits
// and sends them off the chip without a trigger, in frames of one counter cycle
// (20.48 us), over one or two 200 Mb/s serial links.
//
//   channels (8 per region) -> region readout FIFOs (8 regions) -> 64-cell global FIFO
//     -> frame builder (header, data, sync, trailer with count and CRC) -> link serialisers
//   control unit: 100 Mb/s command port, chip select, channel/region/global registers
//   reset manager: power-on reset, RstSync pulse of 2 cycles (time stamp + Tx reset) or
//     of 4 or more cycles (global reset)
//
// Ports: clk is the 200 MHz master clock. pon_rst_b is the asynchronous power-on reset
// (active low); rst_sync the pulse-length coded synchronous reset. chip_addr is the
// chip's 7-bit address, also sent as ChipId in the frame header. cmd_in/cmd_out are the
// slow-control lines. link[1:0] are the data links (link 1 only when gcr[0] bit 0 is
// set). ch_cfg, rcr and gcr carry the configuration registers to the analog blocks
// (threshold and current trims, mask, calibration enable, region and global biases).
// Analog front-end, DACs and link drivers are not part of this RTL.
// Timing: everything runs on clk; the command port and the data links are serial at
// half and full clock rate. The monitoring nets inside (hit_lost, hit_discard, reg_full,
// gfifo_full, late_drop, sent_*, ts_wrap, selected) drive no port: they are there to be
// observed in simulation, so lint reports them as unused.
module amber_top
  import amber_pkg::*;
#(
  parameter int REGION_FIFO_DEPTH = 8,
  parameter int GLOBAL_FIFO_DEPTH = 64,
  parameter int N_RCR             = 16,
  parameter int N_GCR             = 8,
  parameter int GUARD             = 256
) (
  input  logic                  clk,
  input  logic                  pon_rst_b,
  input  logic                  rst_sync,
  input  logic [CHIPID_W-1:0]   chip_addr,
  input  logic [N_CHANNELS-1:0] out_t,
  input  logic [N_CHANNELS-1:0] out_e,
  input  logic [N_CHANNELS-1:0] peak,
  input  logic                  cmd_in,
  output logic                  cmd_out,
  output logic [1:0]            link,
  output ch_cfg_t               ch_cfg [N_CHANNELS],
  output logic [CFG_W-1:0]      rcr    [N_REGIONS][N_RCR],
  output logic [CFG_W-1:0]      gcr    [N_GCR]
);
  logic rst_n, tx_rst, glob_rst;
  logic [TS_W-1:0]    ts;
  logic [FRAME_W-1:0] frame_now;
  logic               ts_wrap;
  cfg_req_t           cfg_req;
  logic [CFG_W-1:0]   reg_rdata [N_REGIONS];
  logic [CFG_W-1:0]   ext_rdata;
  logic               two_links, selected;

  logic [N_REGIONS-1:0] reg_valid, reg_ready, reg_full;
  tagged_hit_t          reg_data [N_REGIONS];
  logic [N_CHANNELS-1:0] hit_lost, hit_discard;
  logic gfifo_full, sent_header, sent_trailer, sent_sync, sent_data, late_drop;

  reset_manager u_rst (
    .clk, .pon_rst_b, .rst_sync, .rst_n, .tx_rst, .glob_rst
  );

  ts_counter u_ts (
    .clk, .rst_n, .srst(tx_rst), .ts, .frame(frame_now), .wrap(ts_wrap)
  );

  control_unit #(.N_GCR(N_GCR)) u_ctrl (
    .clk, .rst_n, .srst(glob_rst), .chip_addr,
    .sdin(cmd_in), .sdout(cmd_out),
    .cfg_req, .ext_rdata, .gcr, .selected, .two_links
  );

  for (genvar r = 0; r < N_REGIONS; r++) begin : g_reg
    ch_cfg_t cfg_r [CH_PER_REGION];
    region #(
      .REGION_ID(3'(r)), .FIFO_DEPTH(REGION_FIFO_DEPTH), .N_RCR(N_RCR)
    ) u_region (
      .clk, .rst_n, .srst(glob_rst), .ts, .frame_now,
      .out_t(out_t[r*CH_PER_REGION +: CH_PER_REGION]),
      .out_e(out_e[r*CH_PER_REGION +: CH_PER_REGION]),
      .peak (peak [r*CH_PER_REGION +: CH_PER_REGION]),
      .cfg_req, .rdata(reg_rdata[r]), .ch_cfg(cfg_r), .rcr(rcr[r]),
      .out_valid(reg_valid[r]), .out_data(reg_data[r]), .out_ready(reg_ready[r]),
      .fifo_full(reg_full[r]),
      .hit_lost(hit_lost[r*CH_PER_REGION +: CH_PER_REGION]),
      .hit_discard(hit_discard[r*CH_PER_REGION +: CH_PER_REGION])
    );
    for (genvar c = 0; c < CH_PER_REGION; c++) begin : g_cfg
      assign ch_cfg[r*CH_PER_REGION + c] = cfg_r[c];
    end
  end

  assign ext_rdata = reg_rdata[cfg_req.region];

  global_ro #(.FIFO_DEPTH(GLOBAL_FIFO_DEPTH), .GUARD(GUARD)) u_gro (
    .clk, .rst_n, .srst(glob_rst), .tx_rst,
    .chip_id(chip_addr), .two_links, .ts, .frame_now,
    .reg_valid, .reg_data, .reg_ready, .link,
    .fifo_full(gfifo_full), .sent_header, .sent_trailer, .sent_sync, .sent_data,
    .late_drop
  );
endmodule
