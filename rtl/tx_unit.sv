// tx_unit: serialisers for the two 200 Mb/s output links.
//
// Each link sends one bit per 200 MHz clock, so a 32-bit word takes 32 cycles. A 5-bit
// bit counter runs freely; when it is 0 the unit asks the frame builder for a word (req)
// and loads it into link 0's shift register. With two links enabled it asks for a
// second word when the counter is 16 and loads it into link 1, so the word stream is
// dealt alternately to the two links and the output rate doubles. With one link, link 1
// stays low. Words go out most significant bit first: bit 31 appears on the link in the
// cycle after the load and bit 0 31 cycles later.
// The 32-bit words, the 200 Mb/s rate and the 1-or-2-link option follow the chip's
// output format; the alternate dealing of words and the half-word offset between the
// links are this design's choices.
module tx_unit (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        srst,
  input  logic        two_links,
  output logic        req,
  input  logic [31:0] word,
  output logic [1:0]  link
);
  logic [4:0]  bitcnt;
  logic [31:0] sh0, sh1;
  logic        ld0, ld1;

  assign ld0  = (bitcnt == 5'd0);
  assign ld1  = two_links && (bitcnt == 5'd16);
  assign req  = ld0 || ld1;
  assign link = {sh1[31], sh0[31]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitcnt <= '0;
      sh0    <= '0;
      sh1    <= '0;
    end else if (srst) begin
      bitcnt <= '0;
      sh0    <= '0;
      sh1    <= '0;
    end else begin
      bitcnt <= bitcnt + 1'b1;
      sh0    <= ld0 ? word : {sh0[30:0], 1'b0};
      if (ld1)            sh1 <= word;
      else if (two_links) sh1 <= {sh1[30:0], 1'b0};
      else                sh1 <= '0;
    end
  end
endmodule
