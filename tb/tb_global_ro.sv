// tb_global_ro: checks the global readout unit from region streams to serial links.
// Eight bench-driven region streams offer frame-tagged hits (valid/ready). The links are
// decoded by link_rx, which locks on sync words. The bench checks that every offered
// hit leaves the chip exactly once, as a data word inside the frame its tag names,
// that headers carry the chip id and consecutive frame numbers, that trailers carry the
// data count and a CRC-16-CCITT the bench computes bit by bit, and that no region is
// starved. A burst larger than the 64-cell FIFO with one link makes the FIFO fill and
// back-pressure the regions; the run then switches to two links (during a quiet
// period, so that link 1 can lock) and repeats, and finally checks that a transmitter
// reset (tx_rst) restarts the frame numbers at 0.
module tb_global_ro;
  import amber_pkg::*;
  localparam logic [6:0] CHIP = 7'h33;

  logic clk = 0, rst_n = 0, srst = 0, tx_rst = 0, two_links = 0;
  logic [TS_W-1:0] ts = '0;
  logic [FRAME_W-1:0] frame_now = '0;
  logic [7:0] reg_valid, reg_ready;
  tagged_hit_t reg_data [8];
  logic [1:0] link;
  logic fifo_full, sent_header, sent_trailer, sent_sync, sent_data, late_drop;
  logic relock = 0;
  logic [1:0] rv, locked;
  logic [31:0] rw [2];

  int checks = 0, failures = 0, n_full = 0, n_hdr = 0, n_trl = 0, n_data = 0, n_sync = 0;
  int cur_frame = -1, cnt_in_frame = 0;
  bit in_frame = 0, expect_restart = 0;
  logic [15:0] crc;
  int pending [logic [30:0]];   // hit -> expected frame
  tagged_hit_t src [8][$];

  global_ro #(.FIFO_DEPTH(64)) dut (
    .clk, .rst_n, .srst, .tx_rst, .chip_id(CHIP), .two_links, .ts, .frame_now,
    .reg_valid, .reg_data, .reg_ready, .link,
    .fifo_full, .sent_header, .sent_trailer, .sent_sync, .sent_data, .late_drop);

  link_rx rx (.clk, .rst_n, .relock, .link, .v(rv), .w(rw), .locked);

  always #2.5 clk = ~clk;
  always @(posedge clk) begin
    if (tx_rst) begin
      ts <= '0; frame_now <= '0;
    end else begin
      ts <= ts + 1'b1;
      if (ts == '1) frame_now <= frame_now + 1'b1;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  function automatic logic [15:0] crc_bits(logic [15:0] c, logic [31:0] w);
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = c[15] ^ w[i];
      c  = c << 1;
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // region streams
  always_comb for (int r = 0; r < 8; r++) begin
    reg_valid[r] = (src[r].size() != 0);
    reg_data[r]  = (src[r].size() != 0) ? src[r][0] : '0;
    reg_data[r].frame = frame_now;     // a region tags a hit when it reads the channel
  end
  always @(posedge clk) begin
    if (rst_n && fifo_full) n_full++;
    for (int r = 0; r < 8; r++) if (rst_n && reg_valid[r] && reg_ready[r]) begin
      pending[src[r][0].hit] = int'(frame_now);
      void'(src[r].pop_front());
    end
  end

  task automatic offer(int r);
    tagged_hit_t h;
    h.hit = 31'($urandom);
    h.hit.region = 3'(r);
    h.frame = '0;
    while (pending.exists(h.hit)) h.hit.te = h.hit.te + 1'b1;
    pending[h.hit] = -1;
    src[r].push_back(h);
  endtask

  task automatic word_in(logic [31:0] w);
    if (w[31] == 1'b0) begin
      n_data++;
      check(in_frame, "data outside a frame");
      if (!pending.exists(w[30:0])) check(0, $sformatf("unknown or repeated hit %h", w));
      else begin
        check(pending[w[30:0]] == cur_frame, "hit sent in the frame of its tag");
        pending.delete(w[30:0]);
      end
      cnt_in_frame++;
      crc = crc_bits(crc, w);
    end else case (w[30:28])
      3'b010: begin
        n_hdr++;
        check(w[27:21] == CHIP && w[20:8] == 0, "header fields");
        if (expect_restart) begin
          // frame 0's header leaves before the receiver has relocked
          check(w[7:0] <= 1 && frame_now <= 1, "frame numbers restart at 0 after tx reset");
          expect_restart = 0;
        end else if (cur_frame >= 0)
          check(int'(w[7:0]) == ((cur_frame + 1) & 255), "consecutive frames");
        cur_frame = int'(w[7:0]);
        in_frame = 1; cnt_in_frame = 0;
        crc = crc_bits(16'hFFFF, w);
      end
      3'b101: begin
        n_trl++;
        if (in_frame) begin
          check(int'(w[27:16]) == cnt_in_frame, "trailer data count");
          check(w[15:0] == crc, "trailer CRC");
        end
        in_frame = 0;
      end
      3'b000: begin
        n_sync++;
        check(w == 32'h8CCC_CCCF, "sync pattern");
      end
      default: check(0, "unknown word type");
    endcase
  endtask

  always @(posedge clk) begin
    if (rst_n && rv[0]) word_in(rw[0]);
    if (rst_n && rv[1]) word_in(rw[1]);
  end

  task automatic wait_drained(int maxcyc);
    int k = 0;
    while (pending.size() != 0 && k < maxcyc) begin @(negedge clk); k++; end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // one link: wait for lock, then a burst larger than the FIFO
    while (n_hdr == 0) @(negedge clk);   // first header seen after lock
    for (int i = 0; i < 25; i++) for (int r = 0; r < 8; r++) offer(r);
    repeat (5) @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      repeat ($urandom_range(20, 60)) @(negedge clk);
      offer($urandom_range(0, 7));
    end
    wait_drained(40000);
    check(pending.size() == 0, $sformatf("all hits sent with one link (%0d left)", pending.size()));
    check(n_full > 0, "global FIFO filled");
    // two links: switch while idle, wait for lock of link 1
    two_links = 1;
    while (!locked[1]) @(negedge clk);
    repeat (100) @(negedge clk);
    for (int i = 0; i < 20; i++) for (int r = 0; r < 8; r++) offer(r);
    for (int i = 0; i < 600; i++) begin
      repeat ($urandom_range(5, 30)) @(negedge clk);
      offer($urandom_range(0, 7));
    end
    wait_drained(40000);
    check(pending.size() == 0, $sformatf("all hits sent with two links (%0d left)", pending.size()));
    // transmitter reset
    repeat (200) @(negedge clk);
    tx_rst = 1; relock = 1; expect_restart = 1; in_frame = 0;
    @(negedge clk);
    tx_rst = 0; relock = 0;
    repeat (6000) @(negedge clk);
    check(!expect_restart, "header seen after tx reset");
    check(n_trl > 4 && n_sync > 0, "trailers and sync words seen");
    $display("data=%0d headers=%0d trailers=%0d sync=%0d full_cycles=%0d", n_data, n_hdr, n_trl, n_sync, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
