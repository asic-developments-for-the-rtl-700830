// link_rx: bench model of the off-chip receiver for the two 200 Mb/s data links.
// Each link is shifted in one bit per clock. An unlocked link hunts for the sync word
// (1 000 1100 1100 1100 1100 1100 1100 1111) in its last 32 bits; from then on it cuts
// the stream into 32-bit words and presents each one on v[l]/w[l] for one cycle. relock
// drops the lock of both links (used after a transmitter reset). Since link 1's words
// complete 16 cycles after link 0's, taking link 0 before link 1 in a cycle restores
// the order in which the chip dealt the words.
module link_rx (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        relock,
  input  logic [1:0]  link,
  output logic [1:0]  v,
  output logic [31:0] w [2],
  output logic [1:0]  locked
);
  logic [31:0] sh [2];
  int          cnt [2];

  always @(posedge clk) begin
    for (int l = 0; l < 2; l++) begin
      logic [31:0] nsh;
      nsh = {sh[l][30:0], link[l]};
      sh[l] <= nsh;
      v[l] <= 1'b0;
      if (!rst_n || relock) begin
        locked[l] <= 1'b0;
        cnt[l]    <= 0;
      end else if (!locked[l]) begin
        if (nsh == 32'h8CCC_CCCF) begin
          locked[l] <= 1'b1;
          cnt[l]    <= 0;
          v[l]      <= 1'b1;
          w[l]      <= nsh;
        end
      end else begin
        if (cnt[l] == 31) begin
          cnt[l] <= 0;
          v[l]   <= 1'b1;
          w[l]   <= nsh;
        end else cnt[l] <= cnt[l] + 1;
      end
    end
  end
endmodule
