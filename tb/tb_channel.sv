// tb_channel: checks one channel's control unit and registers.
// The bench keeps its own time stamp counter and drives out_t, out_e and peak half a
// cycle after a clock edge. With a two-flop synchroniser every edge is stamped with the
// bench's time stamp at the moment it was driven plus 2. The bench checks: validated
// hits (le, pk, te and data_valid), hits without out_e (discarded), hits without a peak
// (pk = te), a new hit while the data wait for readout (lost, data unchanged), a masked
// channel (no hit), both configuration registers and their decoded fields, and 300
// random hits.
module tb_channel;
  import amber_pkg::*;
  logic clk = 0, rst_n = 0, srst = 0;
  logic [TS_W-1:0] ts = '0;
  logic out_t = 0, out_e = 0, peak = 0;
  logic [1:0] cfg_we = '0;
  logic [CFG_W-1:0] cfg_wdata = '0, cfg0, cfg1;
  ch_cfg_t cfg;
  logic data_valid, rd_ack = 0, hit_lost, hit_discard;
  logic [TS_W-1:0] le, pk, te;
  int checks = 0, failures = 0, n_lost = 0, n_discard = 0;

  localparam int LAT = 2;

  channel dut (.clk, .rst_n, .srst, .ts, .out_t, .out_e, .peak,
               .cfg_we, .cfg_wdata, .cfg0, .cfg1, .cfg,
               .data_valid, .le, .pk, .te, .rd_ack, .hit_lost, .hit_discard);

  always #2.5 clk = ~clk;
  always @(posedge clk) ts <= ts + 1'b1;
  always @(posedge clk) begin
    if (rst_n && hit_lost) n_lost++;
    if (rst_n && hit_discard) n_discard++;
  end

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

  // one analog pulse: out_t high for tot cycles, peak rising pk_at cycles after the
  // leading edge (-1: none), out_e high from e_at for e_len cycles (-1: none)
  task automatic hit(int tot, int pk_at, int e_at, int e_len,
                     output logic [TS_W-1:0] t_le, output logic [TS_W-1:0] t_pk,
                     output logic [TS_W-1:0] t_te);
    t_pk = '0;
    @(negedge clk);
    out_t = 1; t_le = ts + TS_W'(LAT);
    for (int k = 0; k < tot; k++) begin
      if (k == pk_at) begin peak = 1; t_pk = ts + TS_W'(LAT); end
      if (e_at >= 0 && k == e_at) out_e = 1;
      if (e_at >= 0 && k == e_at + e_len) out_e = 0;
      @(negedge clk);
    end
    out_t = 0; out_e = 0; t_te = ts + TS_W'(LAT);
    if (pk_at < 0 || pk_at >= tot) t_pk = t_te;
    @(negedge clk);
    peak = 0;
  endtask

  task automatic wait_cycles(int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic read_out();
    @(negedge clk);
    rd_ack = 1;
    @(negedge clk);
    rd_ack = 0;
  endtask

  logic [TS_W-1:0] a, b, c;

  initial begin
    wait_cycles(3);
    rst_n = 1;
    wait_cycles(3);

    // configuration registers
    cfg_wdata = 12'b1_0_10110_01101; cfg_we = 2'b01; @(negedge clk);
    cfg_wdata = 12'h0_15;            cfg_we = 2'b10; @(negedge clk);
    cfg_we = 0; cfg_wdata = 12'hFFF; @(negedge clk);
    check(cfg0 == 12'b1_0_10110_01101 && cfg1 == 12'h015, "config registers written");
    check(cfg.dac_tht == 5'b01101 && cfg.dac_the == 5'b10110 && cfg.mask == 0 &&
          cfg.cal_en == 1 && cfg.dac_if == 5'h15, "config fields decoded");

    // 1. validated hit with peak
    hit(40, 12, 5, 3, a, b, c);
    wait_cycles(LAT + 1);
    check(data_valid, "validated hit gives data_valid");
    check(le == a && pk == b && te == c, $sformatf("times le=%0d/%0d pk=%0d/%0d te=%0d/%0d", le, a, pk, b, te, c));
    read_out();
    check(!data_valid, "data_valid cleared by rd_ack");

    // 2. hit without out_e is discarded
    hit(30, 10, -1, 0, a, b, c);
    wait_cycles(LAT + 2);
    check(!data_valid && n_discard == 1, "unvalidated hit discarded");

    // 3. no peak: peak register takes the trailing edge
    hit(25, -1, 0, 25, a, b, c);
    wait_cycles(LAT + 1);
    check(data_valid && le == a && pk == c && te == c, "missing peak gives pk = te");

    // 4. a hit while waiting for readout is lost, data unchanged
    hit(20, 5, 2, 2, b, b, b);
    wait_cycles(LAT + 1);
    check(n_lost == 1, $sformatf("hit during READY counted as lost (%0d)", n_lost));
    check(data_valid && le == a && te == c, "data kept while lost hit arrives");
    read_out();

    // 5. masked channel ignores hits
    cfg_wdata = 12'h400; cfg_we = 2'b01; @(negedge clk); cfg_we = 0;
    check(cfg.mask, "mask bit set");
    hit(20, 5, 2, 2, a, b, c);
    wait_cycles(LAT + 2);
    check(!data_valid, "masked channel records nothing");
    cfg_wdata = 12'h000; cfg_we = 2'b01; @(negedge clk); cfg_we = 0;

    // 6. random hits
    for (int i = 0; i < 300; i++) begin
      int tot, pka, ea, el;
      bit valid_exp;
      tot = 2 + int'($urandom_range(0, 200));
      pka = int'($urandom_range(0, 220)) - 10;
      if (pka < 0) pka = -1;
      ea  = ($urandom_range(0, 4) == 0) ? -1 : int'($urandom_range(0, tot - 1));
      el  = 1 + int'($urandom_range(0, 10));
      valid_exp = (ea >= 0);
      hit(tot, pka, ea, el, a, b, c);
      wait_cycles(LAT + 1);
      check(data_valid == valid_exp, $sformatf("random hit %0d valid", i));
      if (valid_exp) begin
        check(le == a && pk == b && te == c, $sformatf("random hit %0d times", i));
        wait_cycles($urandom_range(0, 5));
        read_out();
      end
      wait_cycles($urandom_range(0, 3));
    end

    // 7. synchronous reset clears configuration
    srst = 1; @(negedge clk); srst = 0;
    check(cfg0 == 0 && cfg1 == 0 && !data_valid, "srst clears channel");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
