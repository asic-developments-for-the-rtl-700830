// tb_tx_unit: checks the link serialisers. The bench answers every word request with a
// fresh random word and counts clock edges itself: a request must come every 32 cycles
// (one link) or every 16 cycles (two links, alternately for link 0 and link 1), and each
// word must then appear on its link most significant bit first, one bit per cycle,
// starting in the cycle after the request. In one-link mode link 1 must stay low. The
// bench runs one-link mode, switches to two links, and ends with a synchronous reset.
module tb_tx_unit;
  logic clk = 0, rst_n = 0, srst = 0, two_links = 0;
  logic req;
  logic [31:0] word;
  logic [1:0] link;
  int checks = 0, failures = 0, n_words[2] = '{0, 0};
  longint n = 0;          // clock edges since reset release
  logic [31:0] exp_w[2];
  int pos[2] = '{99, 99};

  tx_unit dut (.clk, .rst_n, .srst, .two_links, .req, .word, .link);

  always #2.5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) word <= $urandom;

  always @(posedge clk) begin
    if (rst_n && !srst) begin
      int ph;
      bit exp_req;
      ph = int'(n % 32);
      exp_req = (ph == 0) || (two_links && ph == 16);
      check(req == exp_req, $sformatf("request timing at phase %0d", ph));
      if (req) begin
        int l;
        l = (ph == 16) ? 1 : 0;
        exp_w[l] = word;
        pos[l]   = 0;
        n_words[l]++;
      end
      n++;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      for (int l = 0; l < 2; l++) begin
        if (pos[l] < 32) begin
          check(link[l] == exp_w[l][31 - pos[l]], $sformatf("link %0d bit %0d", l, 31 - pos[l]));
          pos[l]++;
        end else if (l == 1 && !two_links) begin
          check(link[1] == 1'b0, "link 1 idle in one-link mode");
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (32 * 20) @(negedge clk);
    // switch to two links just before a word boundary of link 0
    while (n % 32 != 31) @(negedge clk);
    two_links = 1;
    repeat (32 * 20) @(negedge clk);
    check(n_words[0] >= 39 && n_words[1] >= 19, $sformatf("words sent %0d/%0d", n_words[0], n_words[1]));
    // synchronous reset restarts the word timing
    srst = 1; pos = '{99, 99}; @(negedge clk); srst = 0; n = 0;
    check(link == 2'b00, "links low after srst");
    repeat (32 * 4) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
