// control_unit: the chip's slow-control port and its global configuration registers.
//
// Link: one serial input and one serial output, both at half the master clock (one bit
// every second cycle, 100 Mb/s at 200 MHz). A frame on either line is a start bit (1)
// followed by 16 bits, most significant first; the line idles low.
//
// Commands (bits 15:12 code, bits 11:0 argument):
//   1101  Chip Select      01 aB a6..a0 00   selected = aB | (a6..a0 == chip_addr)
//   0000  Chip Deselect    any               selected = 0
//   0100  Register select  0000 r2r1r0 0 c2c1c0 a0   channel c of region r, Config a0
//                          0000 r2r1r0 1 a3..a0      region register a of region r
//                          0001 0 a6..a0             global register a
//   0101  Register write   d11..d0           write d to the selected register
//   0110  Register read    0                 answer {1000, d11..d0} on the output line
//   1111  No operation
// Commands other than Chip Select and Deselect act only while the chip is selected.
// Channel and region registers live in the regions and are reached through cfg_req
// (a one-cycle write strobe; read data come back on ext_rdata in the same cycle).
// N_GCR global registers are kept here; gcr[0] bit 0 selects two output links.
// The command codes and fields are the chip's; the start-bit framing of the serial
// lines, the number of global registers and the meaning of gcr[0] bit 0 are this
// design's own.
module control_unit
  import amber_pkg::*;
#(
  parameter int N_GCR = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                srst,
  input  logic [CHIPID_W-1:0] chip_addr,
  input  logic                sdin,
  output logic                sdout,
  output cfg_req_t            cfg_req,
  input  logic [CFG_W-1:0]    ext_rdata,
  output logic [CFG_W-1:0]    gcr [N_GCR],
  output logic                selected,
  output logic                two_links
);
  logic        ce;            // half-rate bit enable
  logic        rx_busy;
  logic [4:0]  rx_cnt;
  logic [15:0] rx_sh;
  logic        cmd_valid;
  logic [15:0] cmd;
  logic        tx_busy;
  logic [4:0]  tx_cnt;
  logic [16:0] tx_sh;

  localparam int GA_W = (N_GCR > 1) ? $clog2(N_GCR) : 1;  // global register index width
  logic [GA_W-1:0]  gidx;
  assign gidx = cfg_req.addr[GA_W-1:0];

  cmd_code_e        code;
  logic [CFG_W-1:0] arg;
  assign code = cmd_code_e'(cmd[15:12]);
  assign arg  = cmd[11:0];
  assign two_links = gcr[0][0];

  // ---------------- serial receiver ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ce <= 1'b0; rx_busy <= 1'b0; rx_cnt <= '0; rx_sh <= '0;
      cmd_valid <= 1'b0; cmd <= '0;
    end else if (srst) begin
      ce <= 1'b0; rx_busy <= 1'b0; rx_cnt <= '0; rx_sh <= '0;
      cmd_valid <= 1'b0; cmd <= '0;
    end else begin
      ce        <= !ce;
      cmd_valid <= 1'b0;
      if (ce) begin
        if (!rx_busy) begin
          if (sdin) begin
            rx_busy <= 1'b1;
            rx_cnt  <= '0;
          end
        end else begin
          rx_sh  <= {rx_sh[14:0], sdin};
          rx_cnt <= rx_cnt + 1'b1;
          if (rx_cnt == 5'd15) begin
            rx_busy   <= 1'b0;
            cmd_valid <= 1'b1;
            cmd       <= {rx_sh[14:0], sdin};
          end
        end
      end
    end
  end

  // ---------------- command decoder ----------------
  logic [CFG_W-1:0] rd_value;
  always_comb begin
    rd_value = ext_rdata;
    if (cfg_req.kind == REG_GLOBAL)
      rd_value = (int'(cfg_req.addr) < N_GCR) ? gcr[gidx] : '0;
    else if (cfg_req.kind == REG_NONE)
      rd_value = '0;
  end

  logic send;
  logic [15:0] send_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      selected <= 1'b0;
      cfg_req  <= '0;
      for (int i = 0; i < N_GCR; i++) gcr[i] <= '0;
      send <= 1'b0; send_word <= '0;
    end else if (srst) begin
      selected <= 1'b0;
      cfg_req  <= '0;
      for (int i = 0; i < N_GCR; i++) gcr[i] <= '0;
      send <= 1'b0; send_word <= '0;
    end else begin
      cfg_req.we <= 1'b0;
      send       <= 1'b0;
      if (cmd_valid) begin
        if (code == CMD_CHIP_SEL) begin
          if (arg[11:10] == 2'b01 && arg[1:0] == 2'b00)
            selected <= arg[9] || (arg[8:2] == chip_addr);
        end else if (code == CMD_DESELECT) begin
          selected <= 1'b0;
        end else if (selected) begin
          unique case (code)
            CMD_REG_SEL: begin
              cfg_req.region  <= arg[7:5];
              cfg_req.channel <= '0;
              cfg_req.addr    <= '0;
              if (arg[11:8] == 4'b0000 && !arg[4]) begin
                cfg_req.kind    <= REG_CHANNEL;
                cfg_req.channel <= arg[3:1];
                cfg_req.addr    <= {6'b0, arg[0]};
              end else if (arg[11:8] == 4'b0000 && arg[4]) begin
                cfg_req.kind <= REG_REGION;
                cfg_req.addr <= {3'b0, arg[3:0]};
              end else if (arg[11:7] == 5'b00010) begin
                cfg_req.kind   <= REG_GLOBAL;
                cfg_req.region <= '0;
                cfg_req.addr   <= arg[6:0];
              end else begin
                cfg_req.kind <= REG_NONE;
              end
            end
            CMD_REG_WR: begin
              cfg_req.wdata <= arg;
              if (cfg_req.kind == REG_GLOBAL) begin
                if (int'(cfg_req.addr) < N_GCR) gcr[gidx] <= arg;
              end else if (cfg_req.kind != REG_NONE) begin
                cfg_req.we <= 1'b1;
              end
            end
            CMD_REG_RD: begin
              send      <= 1'b1;
              send_word <= {CMD_CFG_OUT, rd_value};
            end
            default: ;   // NOP and unused codes
          endcase
        end
      end
    end
  end

  // ---------------- serial transmitter ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_busy <= 1'b0; tx_cnt <= '0; tx_sh <= '0;
    end else if (srst) begin
      tx_busy <= 1'b0; tx_cnt <= '0; tx_sh <= '0;
    end else begin
      if (send) begin
        tx_busy <= 1'b1;
        tx_cnt  <= '0;
        tx_sh   <= {1'b1, send_word};
      end else if (ce && tx_busy) begin
        tx_sh  <= {tx_sh[15:0], 1'b0};
        tx_cnt <= tx_cnt + 1'b1;
        if (tx_cnt == 5'd16) tx_busy <= 1'b0;
      end
    end
  end
  assign sdout = tx_busy && tx_sh[16];
endmodule
