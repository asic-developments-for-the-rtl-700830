// tb_frame_builder: checks the output word stream of the frame builder.
// The bench models the global FIFO as a queue, fills it with random hits tagged with
// the current frame, the previous frame (hits read out after the counter wrapped) or an
// older one, and asks for words every 16 or 32 cycles. It decodes the stream itself:
// headers must carry the chip id and consecutive frame numbers; each data word must be
// the FIFO head and belong to the frame whose header was sent last; sync words must
// match the fixed pattern; each trailer must give the number of data words of the frame
// and a CRC-16-CCITT the bench computes bit by bit (its CRC routine is first checked on
// the standard "123456789" vector, 0x29B1); a frame may close only GUARD cycles into
// the next frame and never while one of its hits is at the FIFO head; a hit leaving the
// FIFO without a data word must belong to a frame already closed. Every hit is
// accounted for at the end.
module tb_frame_builder;
  import amber_pkg::*;
  localparam int GUARD = 256;
  localparam logic [6:0] CHIP = 7'h5A;

  logic clk = 0, rst_n = 0, srst = 0;
  logic [TS_W-1:0] ts = '0;
  logic [FRAME_W-1:0] frame_now = '0;
  logic head_valid, pop, req = 0;
  tagged_hit_t head;
  logic [31:0] word;
  logic [FRAME_W-1:0] tx_frame;
  logic sent_header, sent_trailer, sent_sync, sent_data, late_drop;

  tagged_hit_t q [$];
  int checks = 0, failures = 0;
  int n_push = 0, n_data = 0, n_drop = 0, n_hdr = 0, n_trl = 0, n_sync = 0;
  int cur_frame = -1, cnt_in_frame = 0, last_closed = -1;
  bit in_frame = 0;
  logic [15:0] crc;

  frame_builder #(.GUARD(GUARD)) dut (
    .clk, .rst_n, .srst, .chip_id(CHIP), .ts, .frame_now,
    .head_valid, .head, .pop, .req, .word, .tx_frame,
    .sent_header, .sent_trailer, .sent_sync, .sent_data, .late_drop);

  assign head_valid = (q.size() != 0);
  assign head       = (q.size() != 0) ? q[0] : '0;

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

  function automatic logic [15:0] crc_bits(logic [15:0] c, logic [31:0] w, int nbits);
    for (int i = nbits - 1; i >= 0; i--) begin
      logic fb;
      fb = c[15] ^ w[i];
      c  = c << 1;
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stream decoder ----
  always @(posedge clk) begin
    if (rst_n && req) begin
      if (word[31] == 1'b0) begin
        n_data++;
        check(in_frame, "data word outside a frame");
        check(q.size() != 0 && word[30:0] == q[0].hit, "data word is the FIFO head");
        check(q.size() != 0 && int'(q[0].frame) == cur_frame, "data word in the frame of its hit");
        check(pop, "data word pops the FIFO");
        cnt_in_frame++;
        crc = crc_bits(crc, word, 32);
        void'(q.pop_front());
      end else begin
        case (word[30:28])
          3'b010: begin
            n_hdr++;
            check(!in_frame, "header inside a frame");
            check(word[27:21] == CHIP && word[20:8] == 0, "header chip id / reserved");
            check(int'(word[7:0]) == ((cur_frame + 1) & 255), "consecutive frame numbers");
            check(tx_frame == word[7:0], "tx_frame is the frame being sent");
            cur_frame = int'(word[7:0]);
            in_frame = 1; cnt_in_frame = 0;
            crc = crc_bits(16'hFFFF, word, 32);
          end
          3'b101: begin
            int d;
            n_trl++;
            check(in_frame, "trailer outside a frame");
            check(int'(word[27:16]) == cnt_in_frame, $sformatf("DataCnt %0d vs %0d", word[27:16], cnt_in_frame));
            check(word[15:0] == crc, "trailer CRC");
            d = (int'(frame_now) - cur_frame) & 255;
            check(d >= 2 || (d == 1 && int'(ts) >= GUARD), "frame closed only after the guard time");
            check(q.size() == 0 || int'(q[0].frame) != cur_frame, "frame not closed under its own hit");
            in_frame = 0; last_closed = cur_frame;
          end
          3'b000: begin
            n_sync++;
            check(word == 32'h8CCC_CCCF, "sync word pattern");
          end
          default: check(0, "unknown word type");
        endcase
      end
    end
    // hit dropped without being sent: must be from a closed frame
    if (rst_n && pop && !(req && word[31] == 1'b0)) begin
      int age;
      n_drop++;
      check(q.size() != 0, "drop from empty FIFO");
      age = (cur_frame - int'(q[0].frame)) & 255;
      check(age >= 1 && age < 128, "dropped hit belongs to a closed frame");
      void'(q.pop_front());
    end
  end

  // ---- word requests: every 32 cycles, or every 16 in the second half ----
  int cyc = 0;
  always @(negedge clk) begin
    cyc++;
    req <= rst_n && ((cyc < 20000) ? (cyc % 32 == 0) : (cyc % 16 == 0));
  end

  // ---- hit producer ----
  always @(negedge clk) begin
    if (rst_n && cyc > 10 && $urandom_range(0, 49) == 0) begin
      tagged_hit_t h;
      int r;
      h.hit = 31'($urandom);
      r = int'($urandom_range(0, 99));
      if (r < 80)                     h.frame = frame_now;
      else if (r < 95 && ts < 12'd200) h.frame = frame_now - 1'b1;   // delayed hit
      else if (r < 95)                h.frame = frame_now;
      else                            h.frame = frame_now - 8'd1;     // possibly too late
      q.push_back(h);
      n_push++;
    end
  end

  initial begin
    check(crc_bits(crc_bits(crc_bits(16'hFFFF, 32'h31323334, 32), 32'h35363738, 32), 32'h39, 8) == 16'h29B1,
          "bench CRC routine on the standard check vector");
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (9 * 4096) @(negedge clk);
    $display("pushed=%0d data=%0d dropped=%0d headers=%0d trailers=%0d sync=%0d left=%0d",
             n_push, n_data, n_drop, n_hdr, n_trl, n_sync, q.size());
    check(n_push == n_data + n_drop + q.size(), "every hit sent or dropped");
    check(n_trl >= 7, "frames keep closing");
    check(n_drop > 0 && n_sync > 0 && n_data > 0, "drops, sync words and data all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
