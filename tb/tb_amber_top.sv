// tb_amber_top: end-to-end test of the whole chip at its default sizes.
// The bench plays three roles: the analog front-ends (a pulse task drives out_t, out_e
// and peak of any of the 64 channels), the slow-control master (16-bit commands on
// cmd_in, responses decoded from cmd_out) and the data receiver (link_rx locks on sync
// words; the bench decodes headers, data, sync words and trailers, checking frame
// numbers, data counts and CRCs). It keeps its own copy of the time stamp and frame
// counters, restarted where the reset rules say, and predicts every data word: region,
// channel, le, Pk and Te (saturated), and the frame it must appear in.
// Sequence: power-on; configuration (mask a channel, region and global registers, read
// back); random traffic with one link; an overload (global FIFO and region FIFOs full,
// hits lost in busy channels); a pulse so long that its frame is closed before it is
// read (late hit, dropped); switch to two links (broadcast chip select); random traffic;
// a 2-cycle RstSync (time stamps realigned, configuration kept); a 6-cycle RstSync
// (global reset: configuration cleared, chip deselected); traffic again.
// Each mechanism is counted and must have happened at least once.
module tb_amber_top;
  import amber_pkg::*;
  localparam logic [6:0] CHIP = 7'h15;
  localparam int LAT = 2;          // synchroniser latency of a channel input
  localparam int MASKED = 9;       // region 1, channel 1
  localparam int GUARD = 256;

  logic clk = 0, pon_rst_b = 0, rst_sync = 0, cmd_in = 0, cmd_out;
  logic [63:0] out_t = '0, out_e = '0, peak = '0;
  logic [1:0] link;
  ch_cfg_t ch_cfg [64];
  logic [11:0] rcr [8][16];
  logic [11:0] gcr [8];

  amber_top dut (
    .clk, .pon_rst_b, .rst_sync, .chip_addr(CHIP), .out_t, .out_e, .peak,
    .cmd_in, .cmd_out, .link, .ch_cfg, .rcr, .gcr);

  logic relock = 0;
  logic [1:0] rv, locked;
  logic [31:0] rw [2];
  link_rx rx (.clk, .rst_n(pon_rst_b), .relock, .link, .v(rv), .w(rw), .locked);

  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- bench time stamp model ----------------
  logic [11:0] tts = '0;
  logic [7:0]  tframe = '0;
  int pe = 0, clear_in = 0;
  always @(posedge clk) begin
    if (!pon_rst_b) begin
      pe = 0; tts <= '0; tframe <= '0;
    end else begin
      pe++;
      if (clear_in > 0) clear_in--;
      if (pe <= 2 || (clear_in == 0 && clear_pending)) begin
        tts <= '0; tframe <= '0; clear_pending = 0;
      end else begin
        tts <= tts + 1'b1;
        if (tts == '1) tframe <= tframe + 1'b1;
      end
    end
  end
  bit clear_pending = 0;

  // ---------------- mechanism counters ----------------
  int n_lost = 0, n_discard = 0, n_rfull = 0, n_gfull = 0, n_late = 0;
  int n_hdr = 0, n_trl = 0, n_sync = 0, n_data = 0, n_link1 = 0, n_link0 = 0;
  int n_masked_sent = 0, n_unval_sent = 0, n_resp = 0, n_short = 0, n_global = 0, n_bcast = 0;
  always @(posedge clk) if (pon_rst_b && dut.rst_n) begin
    n_lost    += $countones(dut.hit_lost);
    n_discard += $countones(dut.hit_discard);
    if (dut.reg_full != 0) n_rfull++;
    if (dut.gfifo_full) n_gfull++;
    if (dut.late_drop) n_late++;
  end

  // ---------------- expected hits ----------------
  typedef struct { logic [30:0] word; int frame; bit overload; bit drop; } exp_t;
  exp_t pending [logic [17:0]];      // key {region, channel, le}
  bit   ch_busy [64];
  int   n_ovl_gen = 0, n_ovl_rcv = 0, n_drop_exp = 0;

  // one analog pulse; kind: 0 validated, 1 not validated (no out_e)
  task automatic pulse(int ch, int tot, int pk_at, int kind, bit overload = 0, bit drop = 0);
    logic [11:0] le, pk, te, d;
    int fr;
    hit_t h;
    ch_busy[ch] = 1;
    @(negedge clk);
    out_t[ch] = 1;
    if (kind == 0) out_e[ch] = 1;
    le = tts + 12'(LAT);
    fr = (int'(tts) + LAT >= 4096) ? int'(8'(tframe + 8'd1)) : int'(tframe);
    pk = '0;
    for (int k = 0; k < tot; k++) begin
      if (k == 2) out_e[ch] = 0;
      if (k == pk_at) begin peak[ch] = 1; pk = tts + 12'(LAT); end
      @(negedge clk);
    end
    out_t[ch] = 0; out_e[ch] = 0;
    te = tts + 12'(LAT);
    if (pk_at >= tot) pk = te;
    h.region = 3'(ch / 8); h.channel = 3'(ch % 8); h.le = le;
    d = pk - le; h.pk = (d > 63)  ? 6'd63  : d[5:0];
    d = te - le; h.te = (d > 127) ? 7'd127 : d[6:0];
    if (kind == 0 && !ch_cfg[ch].mask) begin
      exp_t e;
      e.word = h; e.frame = fr; e.overload = overload; e.drop = drop;
      pending[{h.region, h.channel, h.le}] = e;
      if (overload) n_ovl_gen++;
      if (drop) n_drop_exp++;
    end else if (ch_cfg[ch].mask) n_masked_sent++;
    else n_unval_sent++;
    @(negedge clk);
    peak[ch] = 0;
    repeat (LAT + 2) @(negedge clk);
    ch_busy[ch] = 0;
  endtask

  // ---------------- stream decoder ----------------
  int cur_frame = -1, cnt_in_frame = 0;
  bit in_frame = 0, expect_restart = 0;
  logic [15:0] crc;
  function automatic logic [15:0] crc_bits(logic [15:0] c, logic [31:0] w);
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = c[15] ^ w[i];
      c  = c << 1;
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  task automatic word_in(logic [31:0] w);
    if (w[31] == 1'b0) begin
      hit_t h;
      logic [17:0] key;
      h = w[30:0];
      key = {h.region, h.channel, h.le};
      n_data++;
      check(in_frame, "data word inside a frame");
      if (!pending.exists(key)) check(0, $sformatf("unexpected data word %h", w));
      else begin
        exp_t e;
        e = pending[key];
        check(w[30:0] == e.word, $sformatf("data word %h expected %h", w[30:0], e.word));
        check(e.frame == cur_frame, $sformatf("hit in frame %0d expected %0d", cur_frame, e.frame));
        check(!e.drop, "late hit must not be sent");
        if (e.overload) n_ovl_rcv++;
        pending.delete(key);
      end
      cnt_in_frame++;
      crc = crc_bits(crc, w);
    end else case (w[30:28])
      3'b010: begin
        n_hdr++;
        check(w[27:21] == CHIP && w[20:8] == 0, "header chip id and reserved bits");
        if (expect_restart) begin
          check(w[7:0] <= 1, "frame numbers restart after reset");
          expect_restart = 0;
        end else if (cur_frame >= 0)
          check(int'(w[7:0]) == ((cur_frame + 1) & 255), "consecutive frame numbers");
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
        check(w == 32'h8CCC_CCCF, $sformatf("sync word %h", w));
      end
      default: check(0, "unknown word type");
    endcase
  endtask

  always @(posedge clk) begin
    if (pon_rst_b && rv[0]) begin n_link0++; word_in(rw[0]); end
    if (pon_rst_b && rv[1]) begin n_link1++; word_in(rw[1]); end
  end

  // ---------------- slow control ----------------
  logic [15:0] resp_q [$];
  initial forever begin
    logic [15:0] r;
    @(negedge clk);
    if (dut.rst_n && cmd_out) begin
      @(negedge clk);
      for (int i = 15; i >= 0; i--) begin
        repeat (2) @(negedge clk);
        r[i] = cmd_out;
      end
      resp_q.push_back(r);
      n_resp++;
      @(negedge clk);
    end
  end

  task automatic send(logic [15:0] c);
    @(negedge clk);
    cmd_in = 1; repeat (2) @(negedge clk);
    for (int i = 15; i >= 0; i--) begin
      cmd_in = c[i]; repeat (2) @(negedge clk);
    end
    cmd_in = 0;
    repeat (40) @(negedge clk);
  endtask

  task automatic read_expect(logic [11:0] d, string what);
    int n0;
    n0 = resp_q.size();
    send(16'h6000);
    check(resp_q.size() == n0 + 1 && resp_q[$] == {4'b1000, d}, what);
  endtask

  function automatic logic [15:0] sel_ch(int r, int c, int a0);
    return {4'b0100, 4'b0000, 3'(r), 1'b0, 3'(c), 1'(a0)};
  endfunction
  function automatic logic [15:0] sel_rg(int r, int a);
    return {4'b0100, 4'b0000, 3'(r), 1'b1, 4'(a)};
  endfunction
  function automatic logic [15:0] sel_gl(int a);
    return {4'b0100, 4'b0001, 1'b0, 7'(a)};
  endfunction
  localparam logic [15:0] SEL_ME = {4'b1101, 2'b01, 1'b0, CHIP, 2'b00};
  localparam logic [15:0] SEL_BC = {4'b1101, 2'b01, 1'b1, 7'h00, 2'b00};

  // ---------------- helpers ----------------
  task automatic wait_drained(int maxcyc);
    int k = 0;
    while (k < maxcyc) begin
      bit busy = 0;
      foreach (pending[key]) if (!pending[key].overload && !pending[key].drop) busy = 1;
      if (!busy) break;
      @(negedge clk); k++;
    end
  endtask

  task automatic random_traffic(int n, int gap_max);
    for (int i = 0; i < n; i++) begin
      int ch, kind, tot;
      do ch = int'($urandom_range(0, 63)); while (ch_busy[ch]);
      kind = ($urandom_range(0, 9) == 0) ? 1 : 0;
      tot = int'($urandom_range(4, 150));
      fork
        pulse(ch, tot, int'($urandom_range(1, 80)), kind);
      join_none
      repeat ($urandom_range(2, gap_max)) @(negedge clk);
    end
    repeat (400) @(negedge clk);
  endtask

  // end of a traffic phase: every hit not received must have been dropped as late,
  // and such drops must stay rare
  int late_mark = 0;
  task automatic phase_end(string what, int nhits);
    int left = 0;
    wait_drained(20000);
    foreach (pending[key]) if (!pending[key].overload && !pending[key].drop) left++;
    check(left == n_late - late_mark, $sformatf("%s: %0d hits missing, %0d dropped late", what, left, n_late - late_mark));
    check(left * 20 <= nhits, $sformatf("%s: late drops rare (%0d of %0d)", what, left, nhits));
    foreach (pending[key]) if (!pending[key].overload && !pending[key].drop) pending.delete(key);
    n_late_traffic += left;
    late_mark = n_late;
  endtask
  int n_late_traffic = 0;

  task automatic resync(string why);
    relock = 1; expect_restart = 1; in_frame = 0;
    @(negedge clk);
    relock = 0;
  endtask

  // a RstSync pulse of n cycles; the time stamp restarts on the 3rd edge after it ends
  task automatic rst_pulse(int n);
    @(negedge clk);
    rst_sync = 1; relock = 1;       // the receiver drops lock before the link is cut
    repeat (n) @(negedge clk);
    rst_sync = 0;
    if (n == 2 || n >= 4) begin clear_in = 3; clear_pending = 1; end
    repeat (4) @(negedge clk);      // the transmitter restarts on the 3rd edge
    resync("reset");
    repeat (6) @(negedge clk);
    check(dut.u_ts.ts == tts, $sformatf("time stamp realigned after %0d-cycle RstSync", n));
  endtask

  task automatic wait_header();
    int n0;
    n0 = n_hdr;
    while (n_hdr == n0) @(negedge clk);
  endtask

  // ---------------- the test ----------------
  initial begin
    foreach (ch_busy[i]) ch_busy[i] = 0;
    repeat (4) @(negedge clk);
    pon_rst_b = 1;
    repeat (20) @(negedge clk);
    check(dut.u_ts.ts == tts, "time stamp starts as expected after power-on");

    // configuration
    send(SEL_ME);
    send(sel_ch(MASKED / 8, MASKED % 8, 0)); send(16'h5400);
    read_expect(12'h400, "channel Config 0 read back");
    check(ch_cfg[MASKED].mask, "channel masked");
    send(sel_ch(5, 3, 1)); send(16'h5017);
    read_expect(12'h017, "channel Config 1 read back");
    check(ch_cfg[43].dac_if == 5'h17, "discharge trim reaches the channel outputs");
    send(sel_rg(2, 5)); send(16'h55A5);
    read_expect(12'h5A5, "region register read back");
    check(rcr[2][5] == 12'h5A5, "region register output");
    send(sel_gl(3)); send(16'h5123);
    read_expect(12'h123, "global register read back");
    check(gcr[3] == 12'h123, "global register output");

    // one link: random traffic including unvalidated and masked hits
    wait_header();
    late_mark = n_late;
    random_traffic(150, 90);
    fork pulse(MASKED, 30, 10, 0); join
    phase_end("one-link traffic", 150);

    // overload right after a frame start
    while (tts != 12'd20) @(negedge clk);
    late_mark = n_late;
    for (int ch = 0; ch < 64; ch++) if (ch != MASKED) fork automatic int c = ch; pulse(c, 6, 3, 0, 1); join_none
    repeat (60) @(negedge clk);
    for (int ch = 0; ch < 16; ch++) if (ch != MASKED) fork automatic int c = ch; pulse(c, 6, 3, 0, 1); join_none
    repeat (60) @(negedge clk);
    for (int w = 0; w < 3; w++) begin
      for (int ch = 0; ch < 8; ch++) fork automatic int c = ch; pulse(c, 6, 3, 0, 1); join_none
      repeat (60) @(negedge clk);
    end
    repeat (4000) @(negedge clk);
    begin
      automatic int left = 0;
      foreach (pending[key]) if (pending[key].overload) left++;
      check(left == n_lost, $sformatf("overload: %0d hits not received, %0d lost in busy channels", left, n_lost));
      foreach (pending[key]) if (pending[key].overload) pending.delete(key);
    end

    // a hit whose frame closes before it is read out
    while (tts != 12'd3990) @(negedge clk);
    late_mark = n_late;
    pulse(20, 520, 40, 0, 0, 1);
    // it waits in the queue of its frame parity until that queue is read again, two
    // frames later, and is dropped there
    repeat (2 * 4096 + 3000) @(negedge clk);
    check(n_late == late_mark + 1, "late hit dropped");
    foreach (pending[key]) if (pending[key].drop) pending.delete(key);

    // two links, set through a broadcast selection
    send(16'h0000);
    send(SEL_BC); n_bcast++;
    send(sel_gl(0)); send(16'h5001);
    check(dut.two_links, "two links enabled");
    while (!locked[1]) @(negedge clk);
    late_mark = n_late;
    random_traffic(300, 45);
    phase_end("two-link traffic", 300);


    // short reset: time stamps realigned, configuration kept
    rst_pulse(2); n_short++;
    check(gcr[0] == 12'h001 && ch_cfg[MASKED].mask, "configuration kept by the short reset");
    wait_header();
    while (!locked[1]) @(negedge clk);
    late_mark = n_late;
    random_traffic(60, 45);
    phase_end("traffic after short reset", 60);

    // 1- and 3-cycle pulses are ignored
    begin
      logic [11:0] t0;
      @(negedge clk); rst_sync = 1; @(negedge clk); rst_sync = 0;
      repeat (3) @(negedge clk); rst_sync = 1; repeat (3) @(negedge clk); rst_sync = 0;
      repeat (10) @(negedge clk);
      check(dut.u_ts.ts == tts && gcr[0] == 12'h001, "1- and 3-cycle RstSync ignored");
    end

    // global reset
    rst_pulse(6); n_global++;
    check(gcr[0] == 0 && gcr[3] == 0 && !ch_cfg[MASKED].mask && rcr[2][5] == 0, "global reset clears configuration");
    check(!dut.two_links && !dut.selected, "global reset: one link, chip deselected");
    send(sel_gl(3)); send(16'h5777);
    check(gcr[3] == 0, "commands ignored until the chip is selected again");
    wait_header();
    late_mark = n_late;
    random_traffic(60, 90);
    fork pulse(MASKED, 30, 10, 0); join
    phase_end("traffic after global reset, formerly masked channel included", 61);
    check(pending.size() == 0, "nothing left pending");

    // mechanisms
    check(n_data > 0, "validated hits sent");
    check(n_unval_sent > 0 && n_discard >= n_unval_sent, "unvalidated hits discarded");
    check(n_masked_sent > 0, "hits on a masked channel");
    check(n_lost > 0, "hits lost in busy channels");
    check(n_rfull > 0, "region FIFO full");
    check(n_gfull > 0, "global FIFO full");
    check(n_late > 0, "late hit dropped");
    check(n_sync > 0 && n_hdr > 0 && n_trl > 0, "sync, header and trailer words");
    check(n_link0 > 0 && n_link1 > 0, "one- and two-link operation");
    check(n_resp >= 4, "register read responses");
    check(n_short > 0 && n_global > 0 && n_bcast > 0, "short reset, global reset, broadcast");
    $display("data=%0d headers=%0d trailers=%0d sync=%0d link0=%0d link1=%0d", n_data, n_hdr, n_trl, n_sync, n_link0, n_link1);
    $display("unvalidated=%0d discarded=%0d masked=%0d lost=%0d overload_gen=%0d overload_rcv=%0d",
             n_unval_sent, n_discard, n_masked_sent, n_lost, n_ovl_gen, n_ovl_rcv);
    $display("region_full_cycles=%0d global_full_cycles=%0d late=%0d (in random traffic %0d) responses=%0d",
             n_rfull, n_gfull, n_late, n_late_traffic, n_resp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
