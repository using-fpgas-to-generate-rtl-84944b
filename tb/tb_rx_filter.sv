// tb_rx_filter: self-checking test of the Ethernet-type packet filter.
// Streams frames of several types through the filter with both channels
// stalling at random, under three settings (both channels on, CPU taking the
// rest, SM channel off), and checks that each frame arrives whole on the
// channel the settings select, or is dropped and counted.
module tb_rx_filter;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic [15:0] sm_etype = 16'h88B5, cpu_etype = 16'h88B6, in_etype;
  logic sm_chan_en, cpu_chan_en, cpu_take_all;
  pkt_beat_t in_beat, sm_beat, cpu_beat;
  logic in_valid, in_ready, sm_valid, sm_ready, cpu_valid, cpu_ready, stat_drop;

  rx_filter dut (.*);

  int checks = 0, failures = 0, drops = 0, exp_drops = 0;
  typedef byte unsigned frame_t[$];
  frame_t exp_sm[$], exp_cpu[$], cur_sm, cur_cpu;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [15:0] et);
    frame_t f;
    bit r;
    int len;
    len = $urandom_range(14, 30);
    for (int i = 0; i < len; i++) f.push_back(8'($urandom));
    if (sm_chan_en && et == sm_etype) exp_sm.push_back(f);
    else if ((cpu_chan_en && et == cpu_etype) || cpu_take_all) exp_cpu.push_back(f);
    else exp_drops++;
    for (int i = 0; i < len; i++) begin
      in_beat = '{data: f[i], sop: i == 0, eop: i == len-1};
      in_etype = et; in_valid = 1;
      do begin #1 r = in_ready; @(negedge clk); end while (!r);
    end
    in_valid = 0;
  endtask

  always @(negedge clk) begin
    sm_ready  = ($urandom_range(0, 3) != 0);
    cpu_ready = ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (stat_drop) drops++;
    check(!(sm_valid && cpu_valid), "one channel at a time");
    if (sm_valid && sm_ready) begin
      if (sm_beat.sop) cur_sm = {};
      cur_sm.push_back(sm_beat.data);
      if (sm_beat.eop) begin
        check(exp_sm.size() > 0 && cur_sm == exp_sm[0], "SM channel frame");
        if (exp_sm.size() > 0) void'(exp_sm.pop_front());
      end
    end
    if (cpu_valid && cpu_ready) begin
      if (cpu_beat.sop) cur_cpu = {};
      cur_cpu.push_back(cpu_beat.data);
      if (cpu_beat.eop) begin
        check(exp_cpu.size() > 0 && cur_cpu == exp_cpu[0], "CPU channel frame");
        if (exp_cpu.size() > 0) void'(exp_cpu.pop_front());
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
    logic [15:0] types [4];
    types = '{16'h88B5, 16'h88B6, 16'h0800, 16'h0806};
    in_valid = 0; in_beat = '0; in_etype = 0;
    sm_chan_en = 1; cpu_chan_en = 1; cpu_take_all = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < 3; s++) begin
      if (s == 1) cpu_take_all = 1;
      if (s == 2) begin sm_chan_en = 0; cpu_take_all = 0; end
      for (int i = 0; i < 20; i++) send(types[$urandom_range(0, 3)]);
    end
    repeat (40) @(negedge clk);
    check(exp_sm.size() == 0 && exp_cpu.size() == 0, "all routed frames delivered");
    check(drops == exp_drops && drops > 0, $sformatf("drops %0d vs %0d", drops, exp_drops));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
