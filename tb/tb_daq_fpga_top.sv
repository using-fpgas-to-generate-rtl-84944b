// tb_daq_fpga_top: end-to-end test of the DAQ firmware at its default sizes.
//
// Models the hard MAC on both sides of the client interface and the CPU on
// the register bus and packet channels, then runs the design's mechanisms:
//   - the CPU programs the registers (own MAC, destinations, generator);
//   - generator mode: frames with cycling destinations, checked in full,
//     with the start-to-start spacing measured at the MAC;
//   - CPU frames sent while the generator runs, mixed by the ratio;
//   - received frames routed by type to the CPU channel, dropped when
//     unknown, discarded on a bad CRC, and an RX buffer overflow while the
//     CPU channel is stalled;
//   - a mode switch to request-response, then memory writes, a 3000-byte
//     read returned in fragments with checked checksums, a no-op and a
//     request with a bad checksum;
//   - the statistics counters read back over the register bus;
//   - generator length and reply size set above what the 4 KB transmit
//     buffer holds: both are capped so that the frames still go out;
//     this also switches the mode back to the generator.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_daq_fpga_top;
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

  localparam mac_addr_t OWN  = 48'h02_00_00_00_00_07;
  localparam mac_addr_t HOST = 48'h00_1B_21_00_00_01;
  localparam logic [15:0] SM_T = 16'h88B5, CPU_T = 16'h88B6;

  int checks = 0, failures = 0;
  typedef byte unsigned frame_t[$];

  // mechanism counters
  int n_gen = 0, n_cpu_tx = 0, n_reply = 0, n_frag = 0, n_cpu_rx = 0;
  int n_switch = 0, n_underrun = 0, n_interleave = 0, n_cap = 0;
  string tx_order = "";

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
  task automatic rd16(input logic [7:0] a, output logic [15:0] d);
    @(negedge clk);
    reg_addr = a; #1 d[15:8] = reg_rdata;
    reg_addr = 8'(a + 1); #1 d[7:0] = reg_rdata;
  endtask

  // ---------------- MAC receive model ----------------
  task automatic mac_rx(input frame_t f, input bit good);
    @(negedge clk);
    for (int i = 0; i < f.size(); i++) begin
      mac_rx_sop = (i == 0); mac_rx_dv = 1; mac_rx_data = f[i];
      @(negedge clk);
    end
    mac_rx_sop = 0; mac_rx_dv = 0;
    mac_rx_good = good; mac_rx_bad = !good;
    @(negedge clk);
    mac_rx_good = 0; mac_rx_bad = 0;
    repeat (12) @(negedge clk);      // inter-frame gap
  endtask

  function automatic frame_t eth(input mac_addr_t d, input mac_addr_t s, input logic [15:0] t);
    frame_t f;
    for (int i = 5; i >= 0; i--) f.push_back(d[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(s[8*i +: 8]);
    f.push_back(t[15:8]); f.push_back(t[7:0]);
    return f;
  endfunction

  function automatic frame_t request(input logic [7:0] cmd, input logic [7:0] tag,
                                     input logic [15:0] off, input logic [15:0] len, input bit good);
    frame_t f;
    logic [15:0] cs;
    f = eth(OWN, HOST, SM_T);
    cs = ~oc_add(oc_add({cmd, tag}, off), len);
    if (!good) cs = cs + 1;
    f = {f, cmd, tag, off[15:8], off[7:0], len[15:8], len[7:0], cs[15:8], cs[7:0]};
    return f;
  endfunction

  // ---------------- MAC transmit model ----------------
  frame_t tx_frames[$];
  int     tx_start_cyc[$];
  frame_t cur;
  bit     streaming = 0;
  int     ack_wait = 0, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (stat_tx_underrun) n_underrun++;
    if (stat_mode_switch) n_switch++;
    if (!streaming) begin
      if (mac_tx_dv && mac_tx_sop) begin
        if (ack_wait < 2) ack_wait <= ack_wait + 1;
        else begin
          cur = {mac_tx_data};
          streaming = 1;
          ack_wait <= 0;
          tx_start_cyc.push_back(cyc);
        end
      end
    end else begin
      check(mac_tx_dv, "MAC fed on every cycle of a frame");
      cur.push_back(mac_tx_data);
      if (mac_tx_eop) begin
        streaming = 0;
        tx_frames.push_back(cur);
      end
    end
  end
  assign mac_tx_ack = !streaming && mac_tx_dv && mac_tx_sop && ack_wait == 2;

  // ---------------- CPU packet channels ----------------
  frame_t cpu_rx_cur, cpu_rx_frames[$];
  bit cpu_rx_hold = 0;
  always @(negedge clk) cpu_rx_ready = !cpu_rx_hold;
  always @(posedge clk) if (rst_n) begin
    if (cpu_rx_valid && cpu_rx_ready) begin
      if (cpu_rx_beat.sop) cpu_rx_cur = {};
      cpu_rx_cur.push_back(cpu_rx_beat.data);
      if (cpu_rx_beat.eop) cpu_rx_frames.push_back(cpu_rx_cur);
    end
  end

  task automatic cpu_send(input frame_t f);
    bit r;
    for (int i = 0; i < f.size(); i++) begin
      @(negedge clk);
      cpu_tx_beat = '{data: f[i], sop: i == 0, eop: i == f.size()-1};
      cpu_tx_valid = 1;
      #1 r = cpu_tx_ready;
      while (!r) begin @(negedge clk); #1 r = cpu_tx_ready; end
    end
    @(negedge clk);
    cpu_tx_valid = 0;
  endtask

  // ---------------- reply checking ----------------
  logic [7:0] mem_model [65536];

  function automatic bit reply_ok(input frame_t f, output int data_len, output int off);
    logic [15:0] acc;
    int n;
    n = f.size();
    acc = 0;
    for (int i = 14; i < n - 2; i += 2)
      acc = oc_add(acc, {f[i], (i + 1 < n - 2) ? f[i+1] : 8'h00});
    acc = ~acc;
    data_len = {f[18], f[19]};
    off = {f[16], f[17]};
    return ({f[n-2], f[n-1]} == acc);
  endfunction

  initial begin
    #50ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    frame_t f;
    mac_rx_sop = 0; mac_rx_dv = 0; mac_rx_good = 0; mac_rx_bad = 0; mac_rx_data = 0;
    reg_addr = 0; reg_wdata = 0; reg_we = 0; cpu_tx_valid = 0; cpu_tx_beat = '0;
    repeat (5) @(negedge clk);
    rst_n = 1;

    // ---- configuration ----
    wr48(8'h20, OWN);
    for (int d = 0; d < 3; d++) wr48(8'(8'h40 + 6*d), {8'h00, 8'h1B, 8'h21, 8'h00, 8'h01, 8'(d)});
    wr16(8'h02, 16'd200);            // payload bytes
    wr32(8'h04, 32'd9);              // frames
    wr32(8'h08, 32'd400);            // 3.2 us spacing
    wr(8'h10, 8'd3);                 // destinations
    wr16(8'h12, 16'd1);              // SM:CPU = 2:1
    wr(8'h00, 8'h02);                // start generator, static data

    // ---- CPU frames while the generator runs ----
    for (int i = 0; i < 3; i++) begin
      f = eth(HOST, OWN, CPU_T);
      repeat (60) f.push_back(8'(8'hC0 + i));
      cpu_send(f);
    end

    // ---- receive path: routing, drop, bad CRC ----
    f = eth(OWN, HOST, CPU_T); repeat (50) f.push_back(8'h11);
    mac_rx(f, 1);
    f = eth(OWN, HOST, 16'h0800); repeat (50) f.push_back(8'h22);
    mac_rx(f, 1);                                          // unknown type: dropped
    f = eth(OWN, HOST, CPU_T); repeat (50) f.push_back(8'h33);
    mac_rx(f, 0);                                          // bad CRC
    // overflow: CPU channel stalled, 3 x 1514 bytes > 4096
    cpu_rx_hold = 1;
    for (int i = 0; i < 3; i++) begin
      f = eth(OWN, HOST, CPU_T); repeat (1500) f.push_back(8'(8'h40 + i));
      mac_rx(f, 1);
    end
    cpu_rx_hold = 0;
    repeat (4000) @(negedge clk);
    check(cpu_rx_frames.size() == 3, $sformatf("CPU received 3 frames (%0d)", cpu_rx_frames.size()));
    if (cpu_rx_frames.size() == 3) begin
      check(cpu_rx_frames[0][14] == 8'h11 && cpu_rx_frames[0].size() == 64, "first CPU frame");
      check(cpu_rx_frames[1][14] == 8'h40 && cpu_rx_frames[2][14] == 8'h41 &&
            cpu_rx_frames[2].size() == 1514, "frames before the overflow kept");
      n_cpu_rx = cpu_rx_frames.size();
    end

    // ---- wait for the generator run to finish ----
    while (tx_frames.size() < 12) @(negedge clk);
    repeat (50) @(negedge clk);
    begin
      int gen_idx = 0, last_start = -1;
      while (tx_frames.size() > 0) begin
        frame_t t;
        int st;
        t = tx_frames.pop_front();
        st = tx_start_cyc.pop_front();
        if ({t[12], t[13]} == CPU_T) begin
          n_cpu_tx++;
          tx_order = {tx_order, "C"};
          check(t.size() == 74, "CPU frame length");
          if (gen_idx > 0 && gen_idx < 9) n_interleave++;
        end else begin
          tx_order = {tx_order, "S"};
          check(t.size() == 214, "generated frame length");
          check(t[5] == 8'(gen_idx % 3), "destination cycles");
          check({t[14], t[15], t[16], t[17]} == 32'(gen_idx), "sequence number");
          check({t[6], t[7], t[8], t[9], t[10], t[11]} == OWN, "source MAC");
          // once the CPU frames are out of the way the spacing is exact
          if (gen_idx >= 5) check(st - last_start == 400, $sformatf("spacing %0d cycles", st - last_start));
          last_start = st;
          gen_idx++;
          n_gen++;
        end
      end
    end
    tx_start_cyc.delete();
    check(n_gen == 9 && n_cpu_tx == 3, $sformatf("9 generated and 3 CPU frames (%0d, %0d)", n_gen, n_cpu_tx));

    // ---- mode switch and request-response ----
    wr(8'h00, 8'h01);
    repeat (5) @(negedge clk);
    check(sm_mode_now, "request-response mode in force");
    for (int i = 0; i < 3000; i++) mem_model[16'h2000 + i] = 8'($urandom);
    for (int blk = 0; blk < 3; blk++) begin
      f = request(CMD_WRITE_MEM, 8'(blk), 16'(16'h2000 + blk * 1000), 16'd1000, 1);
      for (int i = 0; i < 1000; i++) f.push_back(mem_model[16'h2000 + blk * 1000 + i]);
      mac_rx(f, 1);
    end
    mac_rx(request(CMD_READ_MEM, 8'h10, 16'h2000, 16'd3000, 1), 1);
    mac_rx(request(CMD_NOP, 8'h11, 16'h0000, 16'd0, 1), 1);
    mac_rx(request(CMD_READ_MEM, 8'h12, 16'h2000, 16'd10, 0), 1);   // bad checksum
    repeat (12000) @(negedge clk);
    begin
      int total = 0;
      while (tx_frames.size() > 0) begin
        frame_t t;
        int dl, off;
        t = tx_frames.pop_front();
        n_reply++;
        check({t[0], t[1], t[2], t[3], t[4], t[5]} == HOST, "reply goes to the requester");
        check(reply_ok(t, dl, off), "reply checksum");
        if (t[14] == 8'h81) begin
          n_frag++;
          check(t.size() == 14 + 6 + dl + 2, "fragment size matches its length field");
          check(dl <= 1492, "fragment within the frame limit");
          for (int i = 0; i < dl; i++)
            if (t[20 + i] != mem_model[16'(off + i)]) begin check(0, "read data"); break; end
          total += dl;
        end
      end
      check(n_reply == 3 + 3 + 1, $sformatf("7 replies (%0d)", n_reply));
      check(n_frag == 3 && total == 3000, $sformatf("3000 bytes in 3 fragments (%0d, %0d)", total, n_frag));
    end

    // ---- statistics over the register bus ----
    rd16(8'h30, v); check(v == 16'd10, $sformatf("RX good frames %0d", v));
    rd16(8'h32, v); check(v == 16'd1, "RX bad frames");
    rd16(8'h34, v); check(v == 16'd1, "RX overflows");
    rd16(8'h36, v); check(v == 16'd1, "RX unrouted frames");
    rd16(8'h38, v); check(v == 16'd1, "bad requests");
    rd16(8'h3A, v); check(v == 16'd16, $sformatf("SM frames sent %0d", v));
    rd16(8'h3C, v); check(v == 16'd3, "CPU frames sent");

    // ---- frame-size caps: settings larger than the 4 KB transmit buffer ----
    wr16(8'h1A, 16'd6000);           // reply data per frame above the cap
    mac_rx(request(CMD_READ_MEM, 8'h20, 16'h2000, 16'd4100, 1), 1);
    while (tx_frames.size() < 2) @(negedge clk);
    begin
      frame_t t;
      int dl, off;
      for (int k = 0; k < 2; k++) begin
        t = tx_frames.pop_front();
        check(reply_ok(t, dl, off), "capped reply checksum");
        check(dl == (k == 0 ? 4074 : 26), $sformatf("reply fragment %0d carries %0d bytes", k, dl));
        check(t.size() == 22 + dl, "capped reply frame size");
        for (int i = 0; i < dl && off + i < 16'h2000 + 3000; i++)
          if (t[20 + i] != mem_model[16'(off + i)]) begin check(0, "capped read data"); break; end
      end
      if (dl == 26) n_cap++;
    end
    wr(8'h00, 8'h00);                // back to the generator
    repeat (5) @(negedge clk);
    wr16(8'h02, 16'd5000);           // payload above the cap
    wr32(8'h04, 32'd1);
    wr(8'h00, 8'h02);
    while (tx_frames.size() < 1) @(negedge clk);
    begin
      frame_t t;
      t = tx_frames.pop_front();
      check(t.size() == 4096, $sformatf("capped generated frame %0d bytes", t.size()));
      check({t[18], t[19]} == 16'd4082, "capped length field");
      if (t.size() == 4096) n_cap++;
    end

    // ---- every mechanism happened ----
    check(n_gen > 0,       "mechanism: packet generation");
    check(n_cpu_tx > 0,    "mechanism: CPU transmission");
    check(n_interleave > 0, $sformatf("mechanism: CPU frames mixed into a generator run (%s)", tx_order));
    check(n_cpu_rx > 0,    "mechanism: routing to the CPU channel");
    check(n_switch == 2,   "mechanism: mode switch (both ways)");
    check(n_cap == 2,      "mechanism: frame-size caps");
    check(n_frag > 1,      "mechanism: reply fragmentation");
    check(n_underrun == 0, "no transmit underrun");
    $display("mechanisms: gen=%0d cpu_tx=%0d mixed=%0d cpu_rx=%0d switch=%0d replies=%0d fragments=%0d caps=%0d order=%s",
             n_gen, n_cpu_tx, n_interleave, n_cpu_rx, n_switch, n_reply, n_frag, n_cap, tx_order);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
