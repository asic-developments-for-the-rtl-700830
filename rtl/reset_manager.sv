// reset_manager: power-on reset and the pulse-length-encoded synchronous reset.
//
// PonRstb (active low) is an asynchronous power-on reset used only at start-up: it
// clears the whole chip at once and is released through a two-flop synchroniser so that
// every flip-flop leaves reset on the same clock edge (rst_n).
// RstSync (active high, synchronous to the master clock) carries two commands coded in
// the length of its pulse, counted in clock cycles:
//   1 cycle        ignored
//   2 cycles       tx_rst: time stamp counter and transmission units reset
//   3 cycles       ignored
//   4 or more      glob_rst: global reset of all digital logic
// The decoder registers RstSync once, counts the length of the high pulse (saturating
// at 4) and, in the cycle after the pulse ends, issues a one-cycle tx_rst or glob_rst.
// tx_rst is also high with glob_rst, so users of tx_rst need not look at both.
// A pulse of 2 cycles gives a fixed latency from the falling edge of RstSync to the time
// stamp counter restart, which is what lets a whole system align its time stamps.
// The pulse lengths follow the chip's specification; the polarity of RstSync, the
// input register and issuing the reset when the pulse ends are this design's choices.
module reset_manager (
  input  logic clk,
  input  logic pon_rst_b,
  input  logic rst_sync,
  output logic rst_n,     // asynchronous assert, synchronous release
  output logic tx_rst,    // one cycle: time stamp and Tx reset (also with glob_rst)
  output logic glob_rst   // one cycle: global reset
);
  logic [1:0] por_sync;
  logic       rs_q;
  logic [2:0] len;

  always_ff @(posedge clk or negedge pon_rst_b) begin
    if (!pon_rst_b) por_sync <= '0;
    else            por_sync <= {por_sync[0], 1'b1};
  end
  assign rst_n = por_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs_q     <= 1'b0;
      len      <= '0;
      tx_rst   <= 1'b0;
      glob_rst <= 1'b0;
    end else begin
      rs_q     <= rst_sync;
      tx_rst   <= 1'b0;
      glob_rst <= 1'b0;
      if (rs_q) begin
        if (len != 3'd4) len <= len + 1'b1;
      end else begin
        len <= '0;
        if (len == 3'd2) tx_rst <= 1'b1;
        if (len == 3'd4) begin
          tx_rst   <= 1'b1;
          glob_rst <= 1'b1;
        end
      end
    end
  end
endmodule
