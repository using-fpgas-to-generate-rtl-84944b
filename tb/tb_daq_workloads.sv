// tb_daq_workloads: the measurement workloads the firmware was built for,
// run on the complete design at its default sizes.
//
// 1. Request-response latency against reply size. Read requests of 0 to
//    3000 bytes, one at a time. For each, the time from the end of the
//    request at the MAC to the first and to the last reply byte, and the
//    number of reply frames. Checks: the first-byte latency grows by exactly
//    one 8 ns cycle per data byte up to the frame limit, which is the cost of
//    store-and-forward. Replies above 1492 bytes come in a second frame.
// 2. Packet streams at a requested spacing. 1500-byte payloads at 12 us
//    (1500 cycles, full line rate) and at 25 us (3125 cycles, about
//    500 Mbit/s), plus a sweep of shorter frames at several spacings. The MAC
//    model here charges the real per-frame overhead: 4 FCS bytes, a 12-byte
//    gap and an 8-byte preamble, 24 cycles after each frame. Checks: in steady
//    state the spacing at the MAC is max(requested, frame + 24) cycles
//    exactly, so at 12 us the link runs at line rate.
//    The real runs had a million frames; here each run has 8.
// 3. Queued DAQ requests. Several data requests arrive back to back, as
//    when an event builder asks for data in groups. 24 read requests of 256
//    bytes are sent at line rate, more than the 16-entry command queue holds.
//    Checks: every request is answered, in order, with the right data.
module tb_daq_workloads;
  import daq_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, clk_50 = 0, rst_n = 0;
  always #4  clk = ~clk;
  always #10 clk_50 = ~clk_50;

  logic clk_cpu;
  logic mac_rx_sop, mac_rx_dv, mac_rx_good, mac_rx_bad;
  logic [7:0] mac_rx_data, mac_tx_data;
  logic mac_tx_dv, mac_tx_sop, mac_tx_eop, mac_tx_ack;
  logic [7:0] reg_addr, reg_wdata, reg_rdata;
  logic reg_we;
  pkt_beat_t cpu_rx_beat, cpu_tx_beat;
  logic cpu_rx_valid, cpu_rx_ready, cpu_tx_valid, cpu_tx_ready;
  logic sm_mode_now, stat_mode_switch, stat_rr_req, stat_tx_underrun;

  daq_fpga_top dut (.*);

  localparam mac_addr_t   OWN  = 48'h02_00_00_00_00_09;
  localparam mac_addr_t   HOST = 48'h00_1B_21_00_00_02;
  localparam logic [15:0] SM_T = 16'h88B5;
  localparam int          WIRE_OVERHEAD = 24;   // FCS + gap + preamble, bytes

  int checks = 0, failures = 0;
  typedef byte unsigned frame_t[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- CPU register bus ----------------
  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk);
    reg_addr = a; reg_wdata = d; reg_we = 1;
    @(negedge clk);
    reg_we = 0;
  endtask
  task automatic wr16(input logic [7:0] a, input logic [15:0] d);
    wr(a, d[15:8]); wr(8'(a + 1), d[7:0]);
  endtask
  task automatic wr32(input logic [7:0] a, input logic [31:0] d);
    wr16(a, d[31:16]); wr16(8'(a + 2), d[15:0]);
  endtask
  task automatic wr48(input logic [7:0] a, input logic [47:0] d);
    wr16(a, d[47:32]); wr32(8'(a + 2), d[31:0]);
  endtask

  // ---------------- MAC receive model ----------------
  int rx_end_cyc;
  task automatic mac_rx(input frame_t f);
    @(negedge clk);
    for (int i = 0; i < f.size(); i++) begin
      mac_rx_sop = (i == 0); mac_rx_dv = 1; mac_rx_data = f[i];
      @(negedge clk);
    end
    mac_rx_sop = 0; mac_rx_dv = 0;
    mac_rx_good = 1;
    rx_end_cyc = cyc;
    @(negedge clk);
    mac_rx_good = 0;
    repeat (WIRE_OVERHEAD - 1) @(negedge clk);
  endtask

  function automatic frame_t request(input logic [7:0] cmd, input logic [7:0] tag,
                                     input logic [15:0] off, input logic [15:0] len);
    frame_t f;
    logic [15:0] cs;
    for (int i = 5; i >= 0; i--) f.push_back(OWN[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(HOST[8*i +: 8]);
    f.push_back(SM_T[15:8]); f.push_back(SM_T[7:0]);
    cs = ~oc_add(oc_add({cmd, tag}, off), len);
    f = {f, cmd, tag, off[15:8], off[7:0], len[15:8], len[7:0], cs[15:8], cs[7:0]};
    return f;
  endfunction

  // ---------------- MAC transmit model ----------------
  // The first byte is acknowledged once the wire is free: WIRE_OVERHEAD
  // cycles after the previous frame's last byte.
  frame_t tx_frames[$];
  int     tx_start_cyc[$], tx_end_cyc[$];
  frame_t cur;
  bit     streaming = 0;
  int     cyc = 0, last_eop = -1000;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    check(!stat_tx_underrun, "no transmit underrun");
    if (!streaming) begin
      if (mac_tx_ack) begin
        cur = {mac_tx_data};
        streaming = 1;
        tx_start_cyc.push_back(cyc);
      end
    end else begin
      if (!mac_tx_dv) check(0, "MAC fed on every cycle of a frame");
      cur.push_back(mac_tx_data);
      if (mac_tx_eop) begin
        streaming = 0;
        last_eop = cyc;
        tx_frames.push_back(cur);
        tx_end_cyc.push_back(cyc);
      end
    end
  end
  assign mac_tx_ack = !streaming && mac_tx_dv && mac_tx_sop && (cyc - last_eop >= WIRE_OVERHEAD);

  // ---------------- test memory model ----------------
  logic [7:0] mem_model [65536];

  function automatic bit reply_ok(input frame_t f);
    logic [15:0] acc;
    int n;
    n = f.size();
    acc = 0;
    for (int i = 14; i < n - 2; i += 2)
      acc = oc_add(acc, {f[i], (i + 1 < n - 2) ? f[i+1] : 8'h00});
    return ({f[n-2], f[n-1]} == ~acc);
  endfunction

  initial begin
    #100ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- workload 1: latency against size ----------------
  task automatic latency_sweep();
    int sizes[$];
    int lat0;
    sizes = {0, 64, 256, 512, 1024, 1300, 1492, 1493, 2000, 3000};
    $display("request-response latency (from end of request to reply bytes):");
    $display("   bytes  first byte ns  last byte ns  frames");
    foreach (sizes[k]) begin
      int n, got, first, last, frames;
      n = sizes[k];
      mac_rx(request(CMD_READ_MEM, 8'(k), 16'h1000, 16'(n)));
      frames = (n == 0) ? 1 : (n + 1491) / 1492;
      while (tx_frames.size() < frames) @(negedge clk);
      repeat (40) @(negedge clk);
      check(tx_frames.size() == frames, $sformatf("%0d bytes: %0d reply frames", n, frames));
      first = tx_start_cyc[0] - rx_end_cyc;
      last  = tx_end_cyc[tx_end_cyc.size() - 1] - rx_end_cyc;
      got = 0;
      while (tx_frames.size() > 0) begin
        frame_t t;
        int dl, off;
        t = tx_frames.pop_front();
        dl = {t[18], t[19]};
        off = {t[16], t[17]};
        check(t[14] == 8'h81 && t[15] == 8'(k), "reply command and tag");
        check(reply_ok(t), "reply checksum");
        check(dl <= 1492 && t.size() == 22 + dl, "reply frame size");
        for (int i = 0; i < dl; i++)
          if (t[20 + i] != mem_model[16'(off + i)]) begin check(0, "reply data"); break; end
        got += dl;
      end
      check(got == n, $sformatf("%0d bytes returned", n));
      if (n == 0) lat0 = first;
      // store-and-forward: one more cycle per data byte up to the frame limit
      check(first - lat0 == ((n > 1492) ? 1492 : n),
            $sformatf("%0d bytes: first-byte latency %0d cycles (%0d at 0 bytes)", n, first, lat0));
      $display("   %5d  %13d  %12d  %6d", n, first * 8, last * 8, frames);
      tx_start_cyc.delete();
      tx_end_cyc.delete();
    end
  endtask

  // ---------------- workload 2: streams ----------------
  task automatic stream(input int payload, input int delay, input int nframes);
    int expect_gap, frame_len;
    frame_len = 14 + payload;
    expect_gap = (delay > frame_len + WIRE_OVERHEAD) ? delay : frame_len + WIRE_OVERHEAD;
    wr16(8'h02, 16'(payload));
    wr32(8'h04, 32'(nframes));
    wr32(8'h08, 32'(delay));
    wr(8'h00, 8'h0A);                // start, LFSR data
    while (tx_frames.size() < nframes) @(negedge clk);
    repeat (50) @(negedge clk);
    check(tx_frames.size() == nframes, $sformatf("stream %0d/%0d: frame count", payload, delay));
    for (int i = 0; i < nframes; i++) begin
      frame_t t;
      t = tx_frames.pop_front();
      check(t.size() == frame_len, "stream frame length");
      check({t[14], t[15], t[16], t[17]} == 32'(i), "stream sequence number");
      // the first frames leave a store-and-forward delay apart; from the
      // third on the spacing is steady
      if (i >= 2)
        check(tx_start_cyc[i] - tx_start_cyc[i-1] == expect_gap,
              $sformatf("stream %0d B at %0d cycles: spacing %0d, expected %0d", payload, delay,
                        tx_start_cyc[i] - tx_start_cyc[i-1], expect_gap));
    end
    $display("   payload %4d  requested %5d ns  measured %5d ns  %5.1f Mbit/s of frame data",
             payload, delay * 8, (tx_start_cyc[nframes-1] - tx_start_cyc[nframes-2]) * 8,
             real'(frame_len * 8) * 1000.0 / real'((tx_start_cyc[nframes-1] - tx_start_cyc[nframes-2]) * 8));
    tx_start_cyc.delete();
    tx_end_cyc.delete();
  endtask

  // ---------------- workload 3: queued requests ----------------
  task automatic request_burst(input int nreq, input int len);
    for (int r = 0; r < nreq; r++)
      mac_rx(request(CMD_READ_MEM, 8'(8'h40 + r), 16'(16'h1000 + 64 * r), 16'(len)));
    while (tx_frames.size() < nreq) @(negedge clk);
    repeat (50) @(negedge clk);
    check(tx_frames.size() == nreq, $sformatf("%0d queued requests answered", nreq));
    for (int r = 0; r < nreq; r++) begin
      frame_t t;
      int off;
      t = tx_frames.pop_front();
      off = {t[16], t[17]};
      check(t[15] == 8'(8'h40 + r), $sformatf("reply %0d in request order", r));
      check(reply_ok(t) && t.size() == 22 + len, "queued reply frame");
      for (int i = 0; i < len; i++)
        if (t[20 + i] != mem_model[16'(off + i)]) begin check(0, "queued reply data"); break; end
    end
    $display("queued requests: %0d reads of %0d bytes answered in order, %0d ns from the first reply byte to the last",
             nreq, len, (tx_end_cyc[nreq-1] - tx_start_cyc[0]) * 8);
    tx_start_cyc.delete();
    tx_end_cyc.delete();
  endtask

  initial begin
    mac_rx_sop = 0; mac_rx_dv = 0; mac_rx_good = 0; mac_rx_bad = 0; mac_rx_data = 0;
    reg_addr = 0; reg_wdata = 0; reg_we = 0; cpu_tx_valid = 0; cpu_tx_beat = '0;
    cpu_rx_ready = 1;
    repeat (5) @(negedge clk);
    rst_n = 1;
    wr48(8'h20, OWN);
    wr48(8'h40, HOST);

    // request-response mode; fill the test memory with a pattern
    wr(8'h00, 8'h01);
    for (int i = 0; i < 4000; i++) mem_model[16'h1000 + i] = 8'($urandom);
    for (int blk = 0; blk < 4; blk++) begin
      frame_t f;
      f = request(CMD_WRITE_MEM, 8'hF0, 16'(16'h1000 + 1000 * blk), 16'd1000);
      for (int i = 0; i < 1000; i++) f.push_back(mem_model[16'h1000 + 1000 * blk + i]);
      mac_rx(f);
    end
    while (tx_frames.size() < 4) @(negedge clk);
    repeat (20) @(negedge clk);
    foreach (tx_frames[i]) check(reply_ok(tx_frames[i]) && tx_frames[i][14] == 8'h82, "write acknowledged");
    tx_frames.delete(); tx_start_cyc.delete(); tx_end_cyc.delete();

    latency_sweep();
    request_burst(24, 256);

    // generator mode
    wr(8'h00, 8'h00);
    repeat (5) @(negedge clk);
    $display("packet streams:");
    stream(1500, 1500, 8);           // 12 us: line rate
    stream(1500, 3125, 8);           // 25 us: about 500 Mbit/s
    stream(1000, 1200, 6);
    stream(1000, 2000, 6);
    stream(500, 600, 6);
    stream(500, 1000, 6);
    stream(64, 200, 6);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
