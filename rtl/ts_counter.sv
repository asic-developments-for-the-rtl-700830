// ts_counter: the time stamp counter shared by all 64 channels, and the frame counter.
//
// The chip time-stamps hits with a free-running 12-bit counter clocked at the 200 MHz
// master clock (5 ns bins). One full cycle of this counter (4096 x 5 ns = 20.48 us) is
// one readout frame; the 8-bit frame counter advances when the time stamp wraps and
// gives the frame number carried in every frame header. Both counters clear on the
// asynchronous power-on reset and on the synchronous srst, which is driven by the short
// (2-cycle) RstSync pulse and by the global reset. The counter is 0 in the cycle after
// srst is high, so chips sharing RstSync count in step.
// Widths and the frame definition follow the chip's specification; the frame counter
// incrementing on the wrap is this design's reading of it.
module ts_counter
  import amber_pkg::*;
#(
  parameter int TSW = TS_W,
  parameter int FW  = FRAME_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           srst,
  output logic [TSW-1:0] ts,
  output logic [FW-1:0]  frame,
  output logic           wrap      // high in the last cycle of a frame
);
  assign wrap = (ts == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts    <= '0;
      frame <= '0;
    end else if (srst) begin
      ts    <= '0;
      frame <= '0;
    end else begin
      ts <= ts + 1'b1;
      if (wrap) frame <= frame + 1'b1;
    end
  end
endmodule
