// channel: digital part of one readout channel (Channel Control Unit, data registers and
// configuration registers).
//
// The analog channel delivers three discriminator-like signals: out_t (timing threshold
// crossed, "measure"), out_e (higher energy threshold crossed, "validate") and peak
// (peak detector fired). They are asynchronous to the clock and are first passed through
// a SYNC_STAGES flip-flop synchroniser, so every time is measured in 5 ns bins of the
// common time stamp bus ts.
//
// Control (one hit at a time):
//   IDLE  -- rising out_t, channel not masked --> LEAD    load Leading edge  <= ts (LDle)
//   LEAD  first rising peak                              load Peak found     <= ts (LDpk)
//         out_e seen high at any time in LEAD            hit validated
//   LEAD  -- out_t falls --> load Trailing edge <= ts (LDte); if no peak was seen the
//         peak register takes the trailing edge as well; validated -> READY, else the
//         hit is dropped (discard pulse) -> IDLE
//   READY data_valid high until the region acknowledges with rd_ack -> IDLE
// A new rising out_t while READY is not recorded (lost pulse): the channel is dead
// until it has been read out.
//
// Config 0 and Config 1 are 12-bit registers written from cfg_wdata by cfg_we[1:0]
// (LDcfg); they hold the threshold and discharge-current trims and the mask and
// calibration-enable bits (see amber_pkg::unpack_ch_cfg).
// The three data registers, two configuration registers, the double threshold and the
// control signals follow the chip's channel architecture; the state sequence, the
// synchroniser and the rule for a missing peak are this design's own.
module channel
  import amber_pkg::*;
#(
  parameter int SYNC_STAGES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             srst,
  input  logic [TS_W-1:0]  ts,
  // from the analog channel (asynchronous)
  input  logic             out_t,
  input  logic             out_e,
  input  logic             peak,
  // configuration
  input  logic [1:0]       cfg_we,
  input  logic [CFG_W-1:0] cfg_wdata,
  output logic [CFG_W-1:0] cfg0,
  output logic [CFG_W-1:0] cfg1,
  output ch_cfg_t          cfg,
  // readout
  output logic             data_valid,
  output logic [TS_W-1:0]  le,
  output logic [TS_W-1:0]  pk,
  output logic [TS_W-1:0]  te,
  input  logic             rd_ack,
  // monitoring pulses
  output logic             hit_lost,
  output logic             hit_discard
);
  typedef enum logic [1:0] {S_IDLE, S_LEAD, S_READY} state_e;
  state_e state;

  logic [SYNC_STAGES-1:0] t_sync, e_sync, p_sync;
  logic t_s, e_s, p_s, t_d, p_d;
  logic t_rise, p_rise;
  logic validated, pk_seen;

  assign t_s    = t_sync[SYNC_STAGES-1];
  assign e_s    = e_sync[SYNC_STAGES-1];
  assign p_s    = p_sync[SYNC_STAGES-1];
  assign t_rise = t_s && !t_d;
  assign p_rise = p_s && !p_d;
  assign cfg    = unpack_ch_cfg(cfg0, cfg1);
  assign data_valid = (state == S_READY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_sync <= '0; e_sync <= '0; p_sync <= '0;
      t_d    <= 1'b0; p_d <= 1'b0;
    end else begin
      t_sync <= {t_sync[SYNC_STAGES-2:0], out_t};
      e_sync <= {e_sync[SYNC_STAGES-2:0], out_e};
      p_sync <= {p_sync[SYNC_STAGES-2:0], peak};
      t_d    <= t_s;
      p_d    <= p_s;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg0 <= '0;
      cfg1 <= '0;
    end else if (srst) begin
      cfg0 <= '0;
      cfg1 <= '0;
    end else begin
      if (cfg_we[0]) cfg0 <= cfg_wdata;
      if (cfg_we[1]) cfg1 <= cfg_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      le <= '0; pk <= '0; te <= '0;
      validated <= 1'b0; pk_seen <= 1'b0;
      hit_lost <= 1'b0; hit_discard <= 1'b0;
    end else if (srst) begin
      state <= S_IDLE;
      le <= '0; pk <= '0; te <= '0;
      validated <= 1'b0; pk_seen <= 1'b0;
      hit_lost <= 1'b0; hit_discard <= 1'b0;
    end else begin
      hit_lost    <= 1'b0;
      hit_discard <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (t_rise && !cfg.mask) begin
            le        <= ts;                     // LDle
            validated <= e_s;
            pk_seen   <= 1'b0;
            state     <= S_LEAD;
          end
        end
        S_LEAD: begin
          if (e_s) validated <= 1'b1;
          if (p_rise && !pk_seen) begin
            pk      <= ts;                       // LDpk
            pk_seen <= 1'b1;
          end
          if (!t_s) begin
            te <= ts;                            // LDte
            if (!pk_seen && !p_rise) pk <= ts;
            if (validated || e_s) state <= S_READY;
            else begin
              state       <= S_IDLE;
              hit_discard <= 1'b1;
            end
          end
        end
        S_READY: begin
          if (t_rise) hit_lost <= 1'b1;
          if (rd_ack) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_ack_only_when_valid: assert property (@(posedge clk) disable iff (!rst_n) rd_ack |-> data_valid);
endmodule
