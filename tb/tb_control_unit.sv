// tb_control_unit: checks the slow-control port against a reference model of the
// command set kept in the bench. Commands are sent as start bit plus 16 bits, each bit
// held for two clock cycles (100 Mb/s at a 200 MHz clock). The bench's model tracks chip
// selection (own address, broadcast, other address, deselect), the selected register,
// the global registers and a register file standing in for the channel and region
// registers of the regions (written on the cfg_req strobe, read through ext_rdata).
// Every read must answer {1000, data} on the serial output, with the data the model
// predicts; writes while deselected must change nothing. A directed sequence is followed
// by 400 random commands.
module tb_control_unit;
  import amber_pkg::*;
  localparam logic [6:0] ADDR = 7'h2B;
  localparam int N_GCR = 8;

  logic clk = 0, rst_n = 0, srst = 0, sdin = 0, sdout, selected, two_links;
  cfg_req_t cfg_req;
  logic [CFG_W-1:0] ext_rdata, gcr [N_GCR];
  int checks = 0, failures = 0, n_resp = 0, n_exp = 0, n_we = 0;

  // bench register file for channel/region registers: index {kind, region, channel, addr}
  logic [11:0] ext_regs [logic [15:0]];
  function automatic logic [15:0] ext_idx(cfg_req_t r);
    return {r.kind, r.region, r.channel, r.addr[4:0], 3'b0};
  endfunction
  assign ext_rdata = ext_regs.exists(ext_idx(cfg_req)) ? ext_regs[ext_idx(cfg_req)] : 12'h000;

  control_unit #(.N_GCR(N_GCR)) dut (
    .clk, .rst_n, .srst, .chip_addr(ADDR), .sdin, .sdout,
    .cfg_req, .ext_rdata, .gcr, .selected, .two_links);

  always #2.5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && cfg_req.we) begin
    ext_regs[ext_idx(cfg_req)] = cfg_req.wdata;
    n_we++;
  end

  // ---- reference model ----
  bit m_sel = 0;
  int m_kind = 0, m_reg = 0, m_ch = 0, m_addr = 0;
  logic [11:0] m_gcr [N_GCR];
  logic [11:0] m_ext [int];
  logic [15:0] exp_q [$];

  function automatic int m_key();
    return (m_kind << 16) | (m_reg << 12) | (m_ch << 8) | m_addr;
  endfunction

  task automatic model(logic [15:0] c);
    logic [3:0] code;
    logic [11:0] a;
    code = c[15:12]; a = c[11:0];
    if (code == 4'b1101) begin
      if (a[11:10] == 2'b01 && a[1:0] == 2'b00) m_sel = a[9] || (a[8:2] == ADDR);
    end else if (code == 4'b0000) m_sel = 0;
    else if (m_sel) begin
      case (code)
        4'b0100: begin
          m_reg = 0; m_ch = 0; m_addr = 0;
          if (a[11:8] == 0 && !a[4])      begin m_kind = 1; m_reg = int'(a[7:5]); m_ch = int'(a[3:1]); m_addr = int'(a[0]); end
          else if (a[11:8] == 0 && a[4])  begin m_kind = 2; m_reg = int'(a[7:5]); m_addr = int'(a[3:0]); end
          else if (a[11:7] == 5'b00010)   begin m_kind = 3; m_addr = int'(a[6:0]); end
          else m_kind = 0;
        end
        4'b0101: begin
          if (m_kind == 3) begin if (m_addr < N_GCR) m_gcr[m_addr] = a; end
          else if (m_kind != 0) m_ext[m_key()] = a;
        end
        4'b0110: begin
          logic [11:0] d;
          if (m_kind == 3) d = (m_addr < N_GCR) ? m_gcr[m_addr] : 12'h0;
          else if (m_kind == 0) d = 0;
          else d = m_ext.exists(m_key()) ? m_ext[m_key()] : 12'h0;
          exp_q.push_back({4'b1000, d});
          n_exp++;
        end
        default: ;
      endcase
    end
  endtask

  // ---- serial driver ----
  task automatic send(logic [15:0] c);
    model(c);
    @(negedge clk);
    sdin = 1; repeat (2) @(negedge clk);
    for (int i = 15; i >= 0; i--) begin
      sdin = c[i]; repeat (2) @(negedge clk);
    end
    sdin = 0;
    repeat (40) @(negedge clk);   // room for a response
  endtask

  // ---- serial response receiver ----
  initial begin
    forever begin
      logic [15:0] r;
      @(negedge clk);
      if (rst_n && sdout) begin
        @(negedge clk);              // second cycle of the start bit
        for (int i = 15; i >= 0; i--) begin
          repeat (2) @(negedge clk);
          r[i] = sdout;
        end
        n_resp++;
        if (exp_q.size() == 0) check(0, $sformatf("unexpected response %h", r));
        else begin
          logic [15:0] e;
          e = exp_q.pop_front();
          check(r == e, $sformatf("response %h expected %h", r, e));
        end
        @(negedge clk);
      end
    end
  end

  function automatic logic [15:0] chip_sel(bit bc, logic [6:0] a);
    return {4'b1101, 2'b01, bc, a, 2'b00};
  endfunction
  function automatic logic [15:0] sel_ch(int r, int c, int a0);
    return {4'b0100, 4'b0000, 3'(r), 1'b0, 3'(c), 1'(a0)};
  endfunction
  function automatic logic [15:0] sel_rg(int r, int a);
    return {4'b0100, 4'b0000, 3'(r), 1'b1, 4'(a)};
  endfunction
  function automatic logic [15:0] sel_gl(int a);
    return {4'b0100, 4'b0001, 1'b0, 7'(a)};
  endfunction
  function automatic logic [15:0] wr(logic [11:0] d);
    return {4'b0101, d};
  endfunction
  localparam logic [15:0] RD = 16'h6000, NOP = 16'hF000, DESEL = 16'h0000;

  initial begin
    for (int i = 0; i < N_GCR; i++) m_gcr[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // not selected: nothing happens
    send(sel_gl(0)); send(wr(12'h001)); send(RD);
    check(!selected && gcr[0] == 0 && n_we == 0, "deselected chip ignores commands");
    // another chip's address
    send(chip_sel(0, ADDR ^ 7'h10));
    check(!selected, "other address does not select");
    // own address
    send(chip_sel(0, ADDR));
    check(selected, "own address selects");
    send(sel_gl(0)); send(wr(12'h001));
    check(gcr[0] == 12'h001 && two_links, "global register 0 written, two links on");
    send(sel_gl(5)); send(wr(12'hA5C)); send(RD);
    check(gcr[5] == 12'hA5C, "global register 5 written");
    send(sel_ch(3, 6, 1));
    check(cfg_req.kind == REG_CHANNEL && cfg_req.region == 3 && cfg_req.channel == 6 &&
          cfg_req.addr == 1, "channel register select decoded");
    send(wr(12'h3C7));
    check(n_we == 1 && cfg_req.wdata == 12'h3C7, "channel register write strobe");
    send(RD);
    send(sel_rg(7, 11));
    check(cfg_req.kind == REG_REGION && cfg_req.region == 7 && cfg_req.addr == 11, "region register select decoded");
    send(wr(12'h0F1)); send(RD); send(NOP);
    send(DESEL);
    check(!selected, "deselect");
    send(wr(12'hFFF));
    check(n_we == 2, "write ignored while deselected");
    send(chip_sel(1, ADDR ^ 7'h7F));
    check(selected, "broadcast selects");

    // random commands
    for (int i = 0; i < 400; i++) begin
      int k;
      k = int'($urandom_range(0, 99));
      if      (k < 4)  send(chip_sel(1'($urandom_range(0, 1)), ($urandom_range(0, 1) != 0) ? ADDR : 7'($urandom)));
      else if (k < 6)  send(DESEL);
      else if (k < 16) send(sel_ch($urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 1)));
      else if (k < 26) send(sel_rg($urandom_range(0, 7), $urandom_range(0, 15)));
      else if (k < 34) send(sel_gl($urandom_range(0, 9)));
      else if (k < 60) send(wr(12'($urandom)));
      else if (k < 90) send(RD);
      else if (k < 95) send(NOP);
      else             send(16'($urandom));
      if (i % 50 == 0) send(chip_sel(0, ADDR));
    end
    repeat (100) @(negedge clk);
    check(n_resp == n_exp && exp_q.size() == 0, $sformatf("responses %0d expected %0d", n_resp, n_exp));
    for (int i = 0; i < N_GCR; i++) check(gcr[i] == m_gcr[i], $sformatf("gcr %0d final value", i));
    check(two_links == m_gcr[0][0], "two_links follows gcr[0] bit 0");
    $display("responses=%0d writes_to_regions=%0d", n_resp, n_we);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
