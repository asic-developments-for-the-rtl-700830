// tb_workload_rate: throughput test of the whole chip at its default sizes under the hit
// rates of the detector specifications, with random (Poisson) arrival times.
// Scenarios, each started after the previous one has drained:
//   A  MicroMegas, 2 MHz per chip, one link: far below link capacity; every hit must
//      arrive, none may be lost or dropped, and the received rate must match.
//   B  straw tubes, 0.18 MHz on each of the 64 channels (11.52 M hits/s), two links: about
//      93 % of the two-link capacity of 254 data words per 20.48 us frame; losses must
//      stay below 0.1 % and the received rate must be within 1 % of the offered one.
//   C  MicroMegas, 2 MHz on each channel (128 M hits/s), two links: ten times over
//      capacity; the links must be saturated (at least 95 % of the 254 data slots per
//      frame used) and the surplus must show up as hits lost in busy channels.
// In all of them every generated hit must be accounted for: received, lost in a busy
// channel (hit_lost) or dropped late at a frame boundary (late_drop). The bench decodes
// both links with link_rx and checks frame numbers (consecutive), data counts and CRCs of
// every frame. Pulses: out_t high for 40..100 cycles, out_e for the first part, peak
// after 30 cycles (150 ns peaking time). Rates in hits per second are computed from
// the 5 ns clock period.
module tb_workload_rate;
  import amber_pkg::*;
  localparam logic [6:0] CHIP = 7'h2A;
  localparam real TCLK_NS = 5.0;
  localparam int FRAME_CYC = 4096;
  localparam real PULSE_CYC = 75.0;  // mean busy time of a channel per pulse, taken off the waiting time

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
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- counters ----------------
  longint cyc = 0;
  int n_gen = 0, n_lost = 0, n_late = 0, n_discard = 0, n_rx = 0;
  int n_hdr = 0, n_trl = 0;
  always @(posedge clk) if (pon_rst_b && dut.rst_n) begin
    cyc++;
    n_lost    += $countones(dut.hit_lost);
    n_discard += $countones(dut.hit_discard);
    if (dut.late_drop) n_late++;
  end

  // ---------------- receiver: frame structure ----------------
  function automatic logic [15:0] crc_step(logic [15:0] c, logic [31:0] w);
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb = c[15] ^ w[i];
      c  = c << 1;
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  logic [15:0] crc;
  int  in_frame = -1, cnt_in_frame = 0, last_frame = -1, max_in_frame = 0;
  task automatic word_in(logic [31:0] w);
    // in_frame: -1 until the first header (the receiver may lock in the middle of a frame)
    if (!w[31]) begin
      check(in_frame == 1, "data word inside a frame");
      n_rx++; cnt_in_frame++;
      crc = crc_step(crc, w);
      return;
    end
    case (w[30:28])
      3'b010: begin
        check(in_frame != 1, "header outside a frame");
        check(w[27:21] == CHIP, "chip id");
        if (last_frame >= 0) check(int'(w[7:0]) == ((last_frame + 1) % 256), "consecutive frame numbers");
        last_frame = int'(w[7:0]);
        in_frame = 1; cnt_in_frame = 0; n_hdr++;
        crc = crc_step(16'hFFFF, w);
      end
      3'b101: begin
        if (in_frame == -1) return;
        check(in_frame == 1, "trailer inside a frame");
        check(int'(w[27:16]) == cnt_in_frame, "trailer data count");
        check(w[15:0] == crc, "trailer CRC");
        if (cnt_in_frame > max_in_frame) max_in_frame = cnt_in_frame;
        in_frame = 0; n_trl++;
      end
      3'b000: check(w == 32'h8CCC_CCCF, "sync word");
      default: check(0, "unknown word type");
    endcase
  endtask

  always @(posedge clk) begin
    if (pon_rst_b && rv[0]) word_in(rw[0]);
    if (pon_rst_b && rv[1]) word_in(rw[1]);
  end

  // ---------------- front-end model ----------------
  bit ch_busy [64];
  bit gen_on = 0;
  int phase_id = 0;   // generators of an earlier phase stop when it changes

  task automatic pulse(int ch);
    int tot;
    ch_busy[ch] = 1;
    tot = int'($urandom_range(40, 100));
    @(negedge clk);
    if (dut.rst_n) n_gen++;
    out_t[ch] = 1;
    repeat (5) @(negedge clk);
    out_e[ch] = 1;
    repeat (25) @(negedge clk);
    peak[ch] = 1;
    repeat (5) @(negedge clk);
    out_e[ch] = 0;
    repeat (tot - 35) @(negedge clk);
    out_t[ch] = 0;
    peak[ch]  = 0;
    repeat (4) @(negedge clk);
    ch_busy[ch] = 0;
  endtask

  // exponentially distributed waiting time with the given mean, in cycles
  function automatic int exp_cycles(real mean);
    real u;
    u = (real'($urandom) + 1.0) / 4294967297.0;
    return int'(-mean * $ln(u));
  endfunction

  // one generator per channel: after each pulse it waits an exponentially distributed time,
  // so the mean start-to-start interval is the pulse length plus the given mean
  task automatic channel_gen(int ch, real mean);
    int my_phase = phase_id;
    while (gen_on && phase_id == my_phase) begin
      repeat (exp_cycles(mean) + 1) @(negedge clk);
      if (!gen_on || phase_id != my_phase) break;
      pulse(ch);
    end
  endtask

  // one generator for the whole chip: Poisson start times, random free channel
  task automatic chip_gen(real mean);
    int my_phase = phase_id;
    while (gen_on && phase_id == my_phase) begin
      int ch;
      repeat (exp_cycles(mean) + 1) @(negedge clk);
      if (!gen_on || phase_id != my_phase) break;
      do ch = int'($urandom_range(0, 63)); while (ch_busy[ch]);
      fork
        automatic int c = ch;
        pulse(c);
      join_none
    end
  endtask

  // ---------------- slow control ----------------
  task automatic send(logic [15:0] c);
    @(negedge clk);
    cmd_in = 1; repeat (2) @(negedge clk);
    for (int i = 15; i >= 0; i--) begin
      cmd_in = c[i]; repeat (2) @(negedge clk);
    end
    cmd_in = 0;
    repeat (40) @(negedge clk);
  endtask

  // ---------------- scenario bookkeeping ----------------
  int  g0, l0, t0, r0;
  longint c0;

  task automatic start_phase();
    g0 = n_gen; l0 = n_lost; t0 = n_late; r0 = n_rx; c0 = cyc;
    phase_id++;
  endtask

  // wait until every hit has left the chip (or a time limit), then check the balance
  task automatic end_phase(string name, output int gen, output int lost, output int late,
                           output int got, output real secs);
    int k;
    secs = real'(cyc - c0) * TCLK_NS * 1e-9;
    k = 0;
    while (k < 6 * FRAME_CYC && (n_rx - r0) + (n_lost - l0) + (n_late - t0) != (n_gen - g0)) begin
      @(negedge clk); k++;
    end
    repeat (2 * FRAME_CYC) @(negedge clk);
    gen = n_gen - g0; lost = n_lost - l0; late = n_late - t0; got = n_rx - r0;
    check(got + lost + late == gen,
          $sformatf("%s: every hit accounted for (gen %0d, received %0d, lost %0d, late %0d)",
                    name, gen, got, lost, late));
    $display("%s: generated %0d received %0d lost %0d late %0d in %0.1f us (%0.2f M hits/s offered)",
             name, gen, got, lost, late, secs * 1e6, real'(gen) / secs * 1e-6);
  endtask

  // received data words per frame over a window in the middle of a phase
  task automatic window_rate(int frames, output real per_frame);
    int r;
    r = n_rx;
    repeat (frames * FRAME_CYC) @(negedge clk);
    per_frame = real'(n_rx - r) / real'(frames);
  endtask

  initial begin
    int gen, lost, late, got;
    real secs, wr;

    repeat (10) @(negedge clk);
    pon_rst_b = 1;
    repeat (2 * FRAME_CYC) @(negedge clk);
    check(locked[0], "link 0 locked");

    // ---- A: 2 MHz per chip, one link ----
    start_phase();
    gen_on = 1;
    fork chip_gen(100.0); join_none                 // 1 / (2 MHz) = 100 cycles
    window_rate(30, wr);
    gen_on = 0;
    end_phase("A: 2 MHz per chip, one link", gen, lost, late, got, secs);
    check(lost == 0 && late == 0, "A: no hit lost or dropped");
    check(real'(gen) / secs > 1.8e6 && real'(gen) / secs < 2.2e6, "A: offered rate 2 MHz");
    check(wr > 0.9 * 2.0e6 * FRAME_CYC * TCLK_NS * 1e-9, $sformatf("A: received %0.1f hits per frame", wr));
    check(dut.two_links == 0, "A: one link");

    // ---- switch to two links ----
    send({4'b1101, 2'b01, 1'b0, CHIP, 2'b00});      // chip select
    send({4'b0100, 4'b0001, 1'b0, 7'd0});           // global register 0
    send({4'b0101, 12'h001});                        // two links
    repeat (2 * FRAME_CYC) @(negedge clk);
    check(dut.two_links && locked == 2'b11, "two links active and locked");

    // ---- B: 0.18 MHz per channel, two links ----
    start_phase();
    gen_on = 1;
    for (int ch = 0; ch < 64; ch++) fork automatic int c = ch; channel_gen(c, 1111.1 - PULSE_CYC); join_none
    window_rate(40, wr);
    gen_on = 0;
    end_phase("B: 0.18 MHz per channel, two links", gen, lost, late, got, secs);
    check(real'(gen) / secs > 10.5e6 && real'(gen) / secs < 12.5e6, "B: offered rate 11.5 MHz");
    check((lost + late) * 1000 <= gen, $sformatf("B: losses below 0.1 %% (%0d of %0d)", lost + late, gen));
    check(real'(got) >= 0.99 * real'(gen), "B: received rate within 1 %");
    $display("B: %0.1f data words per frame, largest frame %0d", wr, max_in_frame);

    // ---- C: 2 MHz per channel, two links (overload) ----
    max_in_frame = 0;
    start_phase();
    gen_on = 1;
    for (int ch = 0; ch < 64; ch++) fork automatic int c = ch; channel_gen(c, 100.0 - PULSE_CYC); join_none
    repeat (4 * FRAME_CYC) @(negedge clk);           // let the buffers fill
    window_rate(20, wr);
    gen_on = 0;
    end_phase("C: 2 MHz per channel, two links", gen, lost, late, got, secs);
    check(wr >= 0.95 * 254.0, $sformatf("C: links saturated, %0.1f data words per frame", wr));
    check(lost > gen / 2, "C: surplus lost in busy channels");
    $display("C: %0.1f data words per frame (%0.2f M hits/s), largest frame %0d",
             wr, wr / (FRAME_CYC * TCLK_NS * 1e-3), max_in_frame);

    check(n_discard == 0, "no hit without validation");
    check(n_hdr > 100 && n_trl > 100, "frames received");
    $display("frames: headers %0d trailers %0d", n_hdr, n_trl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
