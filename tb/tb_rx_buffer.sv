// tb_rx_buffer: self-checking test of the receive packet buffer.
// A MAC model sends frames at one byte per cycle, each closed by a "good" or
// "bad" strobe. Checks that exactly the good frames come out, whole and in
// order, with the right Ethernet type and length; that bad frames and a frame
// that overflows the (reduced, 128-byte) RAM are discarded and counted; and
// that a buffered frame is read out at one byte per cycle.
module tb_rx_buffer;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic mac_rx_sop, mac_rx_dv, mac_rx_good, mac_rx_bad;
  logic [7:0] mac_rx_data;
  pkt_beat_t out_beat;
  logic out_valid, out_ready;
  logic [15:0] out_etype, out_len;
  logic stat_good, stat_bad, stat_overflow;

  rx_buffer #(.ADDR_W(7), .DESC_DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  typedef byte unsigned frame_t[$];
  frame_t exp_frames[$];
  frame_t cur;
  int n_good = 0, n_bad = 0, n_ovf = 0, frames_out = 0;
  bit stall_rand = 1, hold = 0;
  int first_cyc, cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic mac_frame(input int len, input bit good, input bit expect_out, input logic [15:0] et);
    frame_t f;
    for (int i = 0; i < len; i++) f.push_back((i == 12) ? et[15:8] : (i == 13) ? et[7:0] : 8'($urandom));
    for (int i = 0; i < len; i++) begin
      mac_rx_sop = (i == 0); mac_rx_dv = 1; mac_rx_data = f[i];
      @(negedge clk);
    end
    mac_rx_sop = 0; mac_rx_dv = 0;
    mac_rx_good = good; mac_rx_bad = !good;
    @(negedge clk);
    mac_rx_good = 0; mac_rx_bad = 0;
    if (expect_out) exp_frames.push_back(f);
    repeat (3) @(negedge clk);
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (stat_good) n_good++;
    if (stat_bad) n_bad++;
    if (stat_overflow) n_ovf++;
    if (out_valid && out_ready) begin
      if (out_beat.sop) begin
        cur = {};
        first_cyc = cyc;
        check(exp_frames.size() > 0, "frame expected");
        if (exp_frames.size() > 0) begin
          check(out_len == exp_frames[0].size(), $sformatf("length %0d vs %0d", out_len, exp_frames[0].size()));
          check(out_etype == {exp_frames[0][12], exp_frames[0][13]}, "Ethernet type");
        end
      end
      cur.push_back(out_beat.data);
      if (out_beat.eop) begin
        frames_out++;
        if (exp_frames.size() > 0) begin
          frame_t e;
          e = exp_frames.pop_front();
          check(cur == e, $sformatf("frame %0d contents", frames_out));
          if (!stall_rand) check(cyc - first_cyc == e.size() - 1, "one byte per cycle");
        end
      end
    end
  end

  always @(negedge clk) out_ready = hold ? 1'b0 : stall_rand ? ($urandom_range(0, 7) != 0) : 1'b1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mac_rx_sop = 0; mac_rx_dv = 0; mac_rx_good = 0; mac_rx_bad = 0; mac_rx_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // phase 1: mixed good and bad frames, reader mostly ready
    for (int i = 0; i < 12; i++) begin
      bit g;
      g = (i % 4 != 3);
      mac_frame($urandom_range(20, 40), g, g, 16'(16'h8800 + i));
      repeat (30) @(negedge clk);
    end
    // phase 2: reader stopped; second frame cannot fit
    hold = 1;
    mac_frame(50, 1, 1, 16'h88B5);
    mac_frame(100, 1, 0, 16'h88B5);     // overflow
    mac_frame(30, 0, 0, 16'h88B5);      // bad CRC
    mac_frame(20, 1, 1, 16'h88B6);
    repeat (5) @(negedge clk);
    check(!out_valid || !out_beat.sop || out_len == 50, "first buffered frame waits");
    // phase 3: reader always ready, check rate
    stall_rand = 0;
    hold = 0;
    repeat (200) @(negedge clk);
    mac_frame(40, 1, 1, 16'h0800);
    repeat (100) @(negedge clk);
    check(exp_frames.size() == 0, "all good frames delivered");
    check(n_good == 12, $sformatf("good count %0d", n_good));
    check(n_bad == 4, $sformatf("bad count %0d", n_bad));
    check(n_ovf == 1, $sformatf("overflow count %0d", n_ovf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
