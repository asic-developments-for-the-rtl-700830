// amber_pkg: types and constants shared by the AMBER MicroMegas readout ASIC back-end.
//
// The word formats follow the chip's output and command formats: 32-bit output words
// (header, trailer, sync, data) and 16-bit commands made of a 4-bit code and a 12-bit
// argument. The 12-bit time stamp, the 8 regions of 8 channels, the 7-bit chip address
// and the field widths of every word are the chip's own numbers. The CRC polynomial
// (CRC-16-CCITT, 0x1021, preset 0xFFFF) is this design's choice.
package amber_pkg;

  localparam int TS_W          = 12;  // time stamp counter width (full cycle = one frame)
  localparam int FRAME_W       = 8;   // frame number width (FrameN[7:0])
  localparam int N_REGIONS     = 8;   // regions per chip
  localparam int CH_PER_REGION = 8;   // channels per region
  localparam int N_CHANNELS    = N_REGIONS * CH_PER_REGION;  // 64
  localparam int CFG_W         = 12;  // configuration register width (d11..d0)
  localparam int CHIPID_W      = 7;   // chip address a6..a0
  localparam int PK_W          = 6;   // peak time field Pk[5:0]
  localparam int TE_W          = 7;   // trailing edge field Te[6:0]
  localparam int CNT_W         = 12;  // DataCnt[11:0]

  // Output word headers (bit 31 = Header 1, bits 30:28 = Header 2)
  localparam logic [2:0] HDR2_HEADER  = 3'b010;
  localparam logic [2:0] HDR2_TRAILER = 3'b101;
  localparam logic [2:0] HDR2_SYNC    = 3'b000;
  localparam logic [27:0] SYNC_PAYLOAD = 28'hCCC_CCCF;  // 1100 x6, then 1111

  // One hit as carried in a data word (31 bits below the leading 0)
  typedef struct packed {
    logic [2:0]      region;
    logic [2:0]      channel;
    logic [TS_W-1:0] le;   // leading edge time stamp
    logic [PK_W-1:0] pk;   // peak time, clock cycles after the leading edge
    logic [TE_W-1:0] te;   // trailing edge, clock cycles after the leading edge
  } hit_t;

  // A hit tagged with the frame (time stamp counter cycle) its leading edge belongs to
  typedef struct packed {
    logic [FRAME_W-1:0] frame;
    hit_t               hit;
  } tagged_hit_t;

  // Command codes (bits 15:12 of a 16-bit command)
  typedef enum logic [3:0] {
    CMD_DESELECT = 4'b0000,
    CMD_REG_SEL  = 4'b0100,
    CMD_REG_WR   = 4'b0101,
    CMD_REG_RD   = 4'b0110,
    CMD_CFG_OUT  = 4'b1000,   // code of the 16-bit word sent back by a register read
    CMD_CHIP_SEL = 4'b1101,
    CMD_NOP      = 4'b1111
  } cmd_code_e;

  // Register classes reachable through register select
  typedef enum logic [1:0] {
    REG_NONE    = 2'd0,
    REG_CHANNEL = 2'd1,
    REG_REGION  = 2'd2,
    REG_GLOBAL  = 2'd3
  } reg_kind_e;

  // Register access request from the control unit to the regions
  typedef struct packed {
    reg_kind_e        kind;
    logic [2:0]       region;
    logic [2:0]       channel;
    logic [6:0]       addr;    // a0 for channel, a3..a0 for region, a6..a0 for global
    logic             we;      // one-cycle write strobe
    logic [CFG_W-1:0] wdata;
  } cfg_req_t;

  // Channel configuration, unpacked from Config 0 and Config 1
  typedef struct packed {
    logic [4:0] dac_the;   // energy (validation) threshold trim
    logic [4:0] dac_tht;   // timing threshold trim
    logic [4:0] dac_if;    // discharge current trim
    logic       mask;      // channel disabled
    logic       cal_en;    // calibration (test pulse) enable
  } ch_cfg_t;

  function automatic ch_cfg_t unpack_ch_cfg(logic [CFG_W-1:0] c0, logic [CFG_W-1:0] c1);
    ch_cfg_t r;
    r.dac_tht = c0[4:0];
    r.dac_the = c0[9:5];
    r.mask    = c0[10];
    r.cal_en  = c0[11];
    r.dac_if  = c1[4:0];
    return r;
  endfunction

  // CRC-16-CCITT over one 32-bit word, most significant bit first
  function automatic logic [15:0] crc16_word(logic [15:0] crc_in, logic [31:0] word);
    logic [15:0] c;
    c = crc_in;
    for (int i = 31; i >= 0; i--) begin
      if (c[15] ^ word[i]) c = {c[14:0], 1'b0} ^ 16'h1021;
      else                 c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

  // Frame arithmetic modulo 2^FRAME_W: true when a is strictly older than b
  function automatic logic frame_older(logic [FRAME_W-1:0] a, logic [FRAME_W-1:0] b);
    logic [FRAME_W-1:0] d;
    d = b - a;
    return (d != '0) && !d[FRAME_W-1];
  endfunction

endpackage
