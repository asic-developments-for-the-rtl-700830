// tb_reset_manager: drives RstSync pulses of 1 to 7 cycles and checks that only a
// 2-cycle pulse gives a time stamp/Tx reset, that 4 cycles or more give a global reset
// (with Tx reset), that 1 and 3 cycles are ignored, and that the reset pulse comes a
// fixed 2 clock edges after RstSync falls. Also checks the power-on reset: rst_n low
// immediately on PonRstb and released on the second clock edge after it.
module tb_reset_manager;
  logic clk = 0, pon_rst_b = 0, rst_sync = 0;
  logic rst_n, tx_rst, glob_rst;
  int checks = 0, failures = 0;

  reset_manager dut (.clk, .pon_rst_b, .rst_sync, .rst_n, .tx_rst, .glob_rst);

  always #2.5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send a pulse of n cycles and record where tx_rst / glob_rst appear
  task automatic pulse(int n);
    int n_tx = 0, n_gl = 0, t_tx = -1, t_gl = -1;
    @(negedge clk);
    rst_sync = 1;
    repeat (n) @(negedge clk);
    rst_sync = 0;
    for (int k = 1; k <= 8; k++) begin
      @(negedge clk);
      if (tx_rst)   begin n_tx++; t_tx = k; end
      if (glob_rst) begin n_gl++; t_gl = k; end
    end
    case (n)
      2: begin
        check(n_tx == 1 && n_gl == 0, $sformatf("2-cycle pulse gives one tx_rst only (tx=%0d gl=%0d)", n_tx, n_gl));
        check(t_tx == 2, $sformatf("tx_rst latency %0d", t_tx));
      end
      1, 3: check(n_tx == 0 && n_gl == 0, $sformatf("%0d-cycle pulse ignored", n));
      default: begin
        check(n_gl == 1 && n_tx == 1, $sformatf("%0d-cycle pulse gives global reset", n));
        check(t_gl == 2 && t_tx == 2, $sformatf("global reset latency %0d", t_gl));
      end
    endcase
  endtask

  initial begin
    #1;
    check(rst_n == 0, "rst_n low during power-on reset");
    repeat (3) @(negedge clk);
    pon_rst_b = 1;
    @(posedge clk); #1;
    check(rst_n == 0, "rst_n still low after first edge");
    @(posedge clk); #1;
    check(rst_n == 1, "rst_n released on second edge");
    for (int n = 1; n <= 7; n++) pulse(n);
    // a long pulse also ends up as exactly one global reset
    pulse(40);
    // pulses back to back with a one-cycle gap
    pulse(2); pulse(2);
    // asynchronous power-on reset in mid-cycle
    #1.2 pon_rst_b = 0;
    #0.1 check(rst_n == 0, "asynchronous assertion of power-on reset");
    @(negedge clk);
    check(!tx_rst && !glob_rst, "pulses cleared by power-on reset");
    pon_rst_b = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
