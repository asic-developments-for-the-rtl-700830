// tb_region: checks a region (8 channels and the region control unit).
// Each channel gets a stream of random pulses from its own thread; a channel only gets a
// new pulse once its previous hit has come out of the region, so no hit is lost and
// every hit must appear exactly once. The bench predicts each data word from its own
// time stamp and frame counters: region id, channel, le (drive time + 2), Pk and Te as
// saturated distances from le, and the frame of the leading edge. Some pulses are long
// enough to saturate Pk and Te, and some straddle a frame boundary. out_ready is held low
// for long stretches so the region FIFO fills. Channel and region registers are written
// through cfg_req and read back on rdata, also through the region's ch_cfg outputs.
module tb_region;
  import amber_pkg::*;
  localparam int RIDI = 5;               // region under test
  localparam int ROTHER = RIDI ^ 1;      // a different region
  localparam logic [2:0] RID = 3'(RIDI);
  localparam int LAT = 2;

  logic clk = 0, rst_n = 0, srst = 0;
  logic [TS_W-1:0] ts = '0;
  logic [FRAME_W-1:0] frame_now = '0;
  logic [7:0] out_t = '0, out_e = '0, peak = '0;
  cfg_req_t cfg_req;
  logic [CFG_W-1:0] rdata;
  ch_cfg_t ch_cfg [8];
  logic [CFG_W-1:0] rcr [16];
  logic out_valid, out_ready = 0, fifo_full;
  tagged_hit_t out_data;
  logic [7:0] hit_lost, hit_discard;

  int checks = 0, failures = 0, n_full = 0, n_out = 0, n_sat = 0, n_prev_frame = 0;
  tagged_hit_t expq [8][$];
  bit ready_hold = 0;

  region #(.REGION_ID(RID)) dut (
    .clk, .rst_n, .srst, .ts, .frame_now, .out_t, .out_e, .peak,
    .cfg_req, .rdata, .ch_cfg, .rcr,
    .out_valid, .out_data, .out_ready, .fifo_full, .hit_lost, .hit_discard);

  always #2.5 clk = ~clk;
  always @(posedge clk) begin
    ts <= ts + 1'b1;
    if (ts == '1) frame_now <= frame_now + 1'b1;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frame of the time stamp t = ts + d (d small), as seen at the moment of the call
  function automatic logic [FRAME_W-1:0] frame_of_future(int d);
    return (int'(ts) + d >= 4096) ? frame_now + 1'b1 : frame_now;
  endfunction

  // one pulse on channel c; pushes the expected word
  task automatic pulse(int c, int tot, int pk_at);
    tagged_hit_t e;
    logic [TS_W-1:0] le, pk, te, d;
    @(negedge clk);
    out_t[c] = 1; out_e[c] = 1;
    le = ts + TS_W'(LAT);
    e.frame = frame_of_future(LAT);
    pk = '0;
    for (int k = 0; k < tot; k++) begin
      if (k == 1) out_e[c] = 0;
      if (k == pk_at) begin peak[c] = 1; pk = ts + TS_W'(LAT); end
      @(negedge clk);
    end
    out_t[c] = 0;
    te = ts + TS_W'(LAT);
    if (pk_at >= tot) pk = te;
    e.hit.region  = RID;
    e.hit.channel = 3'(c);
    e.hit.le      = le;
    d = pk - le; e.hit.pk = (d > 63)  ? 6'd63  : d[5:0];
    d = te - le; e.hit.te = (d > 127) ? 7'd127 : d[6:0];
    if ((pk - le) > 63 || (te - le) > 127) n_sat++;
    expq[c].push_back(e);
    @(negedge clk);
    peak[c] = 0;
  endtask

  // output side
  // random readiness, plus a 300-cycle stall every 2000 cycles
  int cyc = 0;
  always @(negedge clk) begin
    cyc++;
    if (!ready_hold && (cyc % 2000) >= 300) out_ready <= ($urandom_range(0, 3) != 0);
    else                                    out_ready <= 0;
  end
  always @(posedge clk) begin
    if (rst_n && fifo_full) n_full++;
    if (rst_n && out_valid && out_ready) begin
      int c;
      c = int'(out_data.hit.channel);
      n_out++;
      if (expq[c].size() == 0) check(0, $sformatf("unexpected word from channel %0d", c));
      else begin
        tagged_hit_t e;
        e = expq[c].pop_front();
        check(out_data == e, $sformatf("word ch%0d got %h exp %h", c, out_data, e));
        if (e.frame != frame_now) n_prev_frame++;
      end
    end
  end

  task automatic cfg_write(reg_kind_e kind, int r, int c, int a, logic [11:0] d);
    @(negedge clk);
    cfg_req.kind = kind; cfg_req.region = 3'(r); cfg_req.channel = 3'(c);
    cfg_req.addr = 7'(a); cfg_req.wdata = d; cfg_req.we = 1;
    @(negedge clk);
    cfg_req.we = 0;
  endtask

  task automatic cfg_read(reg_kind_e kind, int r, int c, int a, output logic [11:0] d);
    @(negedge clk);
    cfg_req.kind = kind; cfg_req.region = 3'(r); cfg_req.channel = 3'(c);
    cfg_req.addr = 7'(a); cfg_req.we = 0;
    #1 d = rdata;
  endtask

  int total = 0;
  task automatic traffic(int cc);
    for (int i = 0; i < 60; i++) begin
      int tot, pka;
      while (expq[cc].size() != 0) @(negedge clk);
      repeat ($urandom_range(1, 150)) @(negedge clk);
      tot = ($urandom_range(0, 9) == 0) ? int'($urandom_range(130, 400)) : int'($urandom_range(2, 60));
      pka = ($urandom_range(0, 9) == 0) ? int'($urandom_range(64, 200)) : int'($urandom_range(1, 40));
      pulse(cc, tot, pka);
      total++;
    end
  endtask

  initial begin
    logic [11:0] d;
    logic [11:0] model_ch [8][2];
    logic [11:0] model_r [16];
    cfg_req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- configuration ----
    for (int c = 0; c < 8; c++)
      for (int a = 0; a < 2; a++) begin
        model_ch[c][a] = 12'($urandom) & ((a == 0) ? 12'h3FF : 12'hFFF);  // keep mask clear
        cfg_write(REG_CHANNEL, RIDI, c, a, model_ch[c][a]);
      end
    for (int a = 0; a < 16; a++) begin
      model_r[a] = 12'($urandom);
      cfg_write(REG_REGION, RIDI, 0, a, model_r[a]);
    end
    // writes addressed to another region must not land here
    cfg_write(REG_CHANNEL, ROTHER, 2, 0, 12'hABC);
    cfg_write(REG_REGION, ROTHER, 0, 3, 12'hABC);
    for (int c = 0; c < 8; c++)
      for (int a = 0; a < 2; a++) begin
        cfg_read(REG_CHANNEL, RIDI, c, a, d);
        check(d == model_ch[c][a], $sformatf("channel %0d config %0d read back", c, a));
      end
    for (int c = 0; c < 8; c++)
      check(ch_cfg[c] == unpack_ch_cfg(model_ch[c][0], model_ch[c][1]), "ch_cfg output");
    for (int a = 0; a < 16; a++) begin
      cfg_read(REG_REGION, RIDI, 0, a, d);
      check(d == model_r[a] && rcr[a] == model_r[a], $sformatf("region register %0d", a));
    end
    cfg_read(REG_REGION, ROTHER, 0, 3, d);
    check(d == 0, "other region reads as 0 here");

    // ---- readout: FIFO fill with out_ready held low ----
    ready_hold = 1;
    fork
      pulse(0, 10, 4); pulse(1, 11, 4); pulse(2, 12, 4); pulse(3, 13, 4);
      pulse(4, 14, 4); pulse(5, 15, 4); pulse(6, 16, 4); pulse(7, 17, 4);
    join
    repeat (20) @(negedge clk);
    check(fifo_full, "region FIFO full with 8 hits and no readout");
    ready_hold = 0;

    // ---- readout: random traffic on all channels for about three frames ----
    fork
      traffic(0); traffic(1); traffic(2); traffic(3);
      traffic(4); traffic(5); traffic(6); traffic(7);
    join
    ready_hold = 0;
    repeat (200) @(negedge clk);
    for (int c = 0; c < 8; c++) check(expq[c].size() == 0, $sformatf("all hits of channel %0d out", c));
    check(n_out == total + 8, $sformatf("word count %0d vs %0d", n_out, total + 8));
    check(n_sat > 0, "saturated Pk/Te seen");
    check(n_full > 0, "FIFO full seen");
    check(frame_now >= 2, "ran across frame boundaries");
    $display("words=%0d saturated=%0d full_cycles=%0d frames=%0d read_in_later_frame=%0d",
             n_out, n_sat, n_full, frame_now, n_prev_frame);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
