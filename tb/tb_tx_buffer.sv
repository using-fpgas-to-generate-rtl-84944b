// tb_tx_buffer: self-checking test of the store-and-forward transmit buffer.
// A source writes frames with random gaps; checks that no byte of a frame is
// offered before the whole frame is stored, that frames come out intact and
// in order, that with out_ready high a frame flows at one byte per cycle, and
// that the source is held off (in_ready low) while the buffer is full.
module tb_tx_buffer;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  pkt_beat_t in_beat, out_beat;
  logic in_valid, in_ready, out_valid, out_ready, pkt_avail;

  tx_buffer #(.ADDR_W(7), .DESC_DEPTH(4)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, first = 0, held_off = 0;
  int frames_in = 0, frames_out = 0;
  typedef byte unsigned frame_t[$];
  frame_t exp_q[$], cur;
  bit ready_rand = 0, stop = 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input int len);
    frame_t f;
    bit r;
    for (int i = 0; i < len; i++) f.push_back(8'($urandom));
    exp_q.push_back(f);
    for (int i = 0; i < len; i++) begin
      in_beat = '{data: f[i], sop: i == 0, eop: i == len-1};
      in_valid = 1;
      do begin
        #1 r = in_ready;
        if (!r) held_off++;
        @(negedge clk);
      end while (!r);
      in_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    frames_in++;
  endtask

  always @(negedge clk) out_ready = stop ? 1'b0 : ready_rand ? ($urandom_range(0, 1) == 1) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out_valid && out_beat.sop && !cur.size()) check(frames_in > frames_out, "frame offered only when complete");
    if (out_valid && out_ready) begin
      if (out_beat.sop) begin cur = {}; first = cyc; end
      cur.push_back(out_beat.data);
      if (out_beat.eop) begin
        check(exp_q.size() > 0 && cur == exp_q[0], "frame contents");
        if (!ready_rand && exp_q.size() > 0) check(cyc - first == exp_q[0].size() - 1, "one byte per cycle");
        if (exp_q.size() > 0) void'(exp_q.pop_front());
        frames_out++;
        cur = {};
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_beat = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // output stopped: 3 frames fit (40+40+40 bytes), the 4th is held off
    fork
      begin
        for (int i = 0; i < 4; i++) send(40);
      end
      begin
        repeat (600) @(negedge clk);
        check(held_off > 0, "source held off while full");
        stop = 0;
      end
    join
    repeat (300) @(negedge clk);
    ready_rand = 1;
    for (int i = 0; i < 8; i++) send($urandom_range(1, 60));
    repeat (500) @(negedge clk);
    check(exp_q.size() == 0 && frames_out == 12, $sformatf("all frames delivered (%0d)", frames_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
