// tb_pkt_gen: self-checking test of the packet generator.
// Runs the generator with static and with LFSR data and checks every frame:
// destination cycling through the table, source, type, sequence number,
// length field and payload (the LFSR is modelled independently). Checks the
// frame count and the spacing from frame start to frame start in clock
// cycles, also when the spacing is shorter than a frame, and the stop pulse.
module tb_pkt_gen;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  cfg_t cfg;
  logic start, stop, out_valid, out_ready, busy;
  pkt_beat_t out_beat;
  logic [31:0] sent;

  pkt_gen dut (.*);

  int checks = 0, failures = 0, cyc = 0, last_start = -1, frames = 0;
  int exp_gap = 0;
  bit gaps_on = 1;
  byte unsigned cur[$];
  logic [31:0] lfsr;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] lfsr_next(input logic [31:0] s);
    return {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
  endfunction

  always @(negedge clk) out_ready = 1'b1;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out_valid && out_ready) begin
      if (out_beat.sop) begin
        cur = {};
        if (last_start >= 0 && gaps_on)
          check(cyc - last_start == exp_gap, $sformatf("spacing %0d vs %0d", cyc - last_start, exp_gap));
        last_start = cyc;
      end
      cur.push_back(out_beat.data);
      if (out_beat.eop) begin
        int d;
        logic [47:0] dm;
        d = frames % cfg.gen_ndest;
        dm = cfg.dest[d];
        check(cur.size() == 14 + cfg.gen_len, $sformatf("frame size %0d", cur.size()));
        check({cur[0], cur[1], cur[2], cur[3], cur[4], cur[5]} == dm, $sformatf("destination %0d", d));
        check({cur[6], cur[7], cur[8], cur[9], cur[10], cur[11]} == cfg.own_mac, "source");
        check({cur[12], cur[13]} == cfg.sm_etype, "type");
        check({cur[14], cur[15], cur[16], cur[17]} == 32'(frames), "sequence number");
        check({cur[18], cur[19]} == cfg.gen_len, "length field");
        for (int i = 20; i < cur.size(); i++) begin
          logic [7:0] e;
          if (cfg.gen_random) begin e = lfsr[7:0]; lfsr = lfsr_next(lfsr); end
          else e = cfg.gen_static;
          if (cur[i] != e) begin check(0, $sformatf("data byte %0d", i)); break; end
        end
        checks++;
        frames++;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    frames = 0; last_start = -1;
    start = 1; @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    check(frames == n, $sformatf("frames sent %0d vs %0d", frames, n));
    check(sent == 32'(n), "sent counter");
  endtask

  initial begin
    cfg = '0;
    cfg.own_mac = 48'h02_00_00_00_00_01;
    cfg.sm_etype = 16'h88B5;
    for (int d = 0; d < 16; d++) cfg.dest[d] = {8'h00, 8'hAA, 32'(d)};
    start = 0; stop = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // static data, 5 destinations, spacing 120 cycles
    cfg.gen_len = 60; cfg.gen_count = 12; cfg.gen_delay = 120; cfg.gen_ndest = 5;
    cfg.gen_random = 0; cfg.gen_static = 8'h5A;
    exp_gap = 120;
    run(12);
    // LFSR data, 16 destinations, spacing shorter than the frame
    cfg.gen_len = 100; cfg.gen_count = 20; cfg.gen_delay = 10; cfg.gen_ndest = 16;
    cfg.gen_random = 1; cfg.gen_seed = 32'h1234_5678;
    lfsr = 32'h1234_5678;
    exp_gap = 115;     // 114-byte frame plus one cycle
    run(20);
    // stop after a few frames
    cfg.gen_count = 1000; cfg.gen_delay = 200; gaps_on = 0;
    lfsr = 32'h1234_5678;
    frames = 0;
    start = 1; @(negedge clk); start = 0;
    repeat (700) @(negedge clk);
    stop = 1; @(negedge clk); stop = 0;
    while (busy) @(negedge clk);
    check(frames == 4, $sformatf("stopped after 4 frames (%0d)", frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
