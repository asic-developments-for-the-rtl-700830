// tb_ts_counter: checks the time stamp counter against a cycle count kept by the bench:
// the value follows the clock, wraps every 4096 cycles, the frame counter steps on each
// wrap, wrap is high exactly on the last count, and a synchronous reset restarts both
// counters at 0 in the next cycle.
module tb_ts_counter;
  import amber_pkg::*;
  logic clk = 0, rst_n = 0, srst = 0;
  logic [TS_W-1:0] ts;
  logic [FRAME_W-1:0] frame;
  logic wrap;
  int checks = 0, failures = 0;
  longint cyc;   // cycles since the last (re)start of the counter

  ts_counter dut (.clk, .rst_n, .srst, .ts, .frame, .wrap);

  always #2.5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at t=%0t ts=%0d frame=%0d cyc=%0d", what, $time, ts, frame, cyc);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    cyc = 0;
    for (int i = 0; i < 3 * 4096 + 100; i++) begin
      check(ts == TS_W'(cyc % 4096), "ts value");
      check(frame == FRAME_W'(cyc / 4096), "frame value");
      check(wrap == ((cyc % 4096) == 4095), "wrap flag");
      @(negedge clk);
      cyc++;
    end
    // synchronous restart mid-frame
    srst = 1;
    @(negedge clk);
    srst = 0;
    cyc = 0;
    for (int i = 0; i < 5000; i++) begin
      check(ts == TS_W'(cyc % 4096), "ts after srst");
      check(frame == FRAME_W'(cyc / 4096), "frame after srst");
      @(negedge clk);
      cyc++;
    end
    // frame counter rolls over after 256 frames
    cyc = 0;
    srst = 1; @(negedge clk); srst = 0;
    repeat (256 * 4096) @(negedge clk);
    check(frame == 0 && ts == 0, "frame counter roll-over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
