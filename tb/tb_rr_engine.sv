// tb_rr_engine: self-checking test of the request-response engine.
//
// Sends raw request frames (write memory, read memory, no-op, a request with
// a bad checksum and one of the wrong Ethernet type) and checks every reply
// frame byte by byte against a reference model of the test memory and the
// reply format, including fragmentation of a long read into frames of at most
// max_data bytes and the one's complement checksum of each frame. The output
// is stalled at random to exercise back-pressure. It also checks that with
// the output always ready a reply's data flows at one byte per cycle.
module tb_rr_engine;
  import daq_pkg::*;

  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  localparam mac_addr_t OWN  = 48'h02_00_00_00_00_01;
  localparam mac_addr_t HOST = 48'h00_11_22_33_44_55;
  localparam logic [15:0] ET = 16'h88B5;
  localparam int MAXD = 100;

  pkt_beat_t in_beat, out_beat;
  logic in_valid, in_ready, out_valid, out_ready, busy, stat_req, stat_bad, stat_frame;
  logic stall_en;

  rr_engine #(.MEM_ADDR_W(16), .FIFO_DEPTH(4)) dut (
    .clk, .rst_n, .own_mac(OWN), .etype(ET), .max_data(16'(MAXD)),
    .in_beat, .in_valid, .in_ready, .out_beat, .out_valid, .out_ready,
    .busy, .stat_req, .stat_bad, .stat_frame
  );

  int checks = 0, failures = 0;
  logic [7:0] model [65536];
  bit         known [65536];
  byte unsigned exp_q [$];     // expected reply bytes, all frames concatenated
  int          exp_eop_q [$];  // 1 on the last byte of each expected frame
  int          bad_seen = 0, req_seen = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [15:0] csum_of(input byte unsigned b[$]);
    logic [15:0] acc = 0;
    for (int i = 0; i < b.size(); i += 2) begin
      logic [15:0] w = {b[i], (i+1 < b.size()) ? b[i+1] : 8'h00};
      acc = oc_add(acc, w);
    end
    return ~acc;
  endfunction

  // drives a frame, one byte per accepted handshake; signals change at the
  // falling edge and in_ready is sampled just before the rising edge
  task automatic send_frame(input byte unsigned f[$]);
    bit r;
    @(negedge clk);
    for (int i = 0; i < f.size(); i++) begin
      in_beat  = '{data: f[i], sop: (i == 0), eop: (i == f.size()-1)};
      in_valid = 1'b1;
      do begin
        #1 r = in_ready;
        @(negedge clk);
      end while (!r);
    end
    in_valid = 1'b0;
  endtask

  function automatic void push_eth(ref byte unsigned f[$], input mac_addr_t d, input mac_addr_t s, input logic [15:0] t);
    for (int i = 5; i >= 0; i--) f.push_back(d[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(s[8*i +: 8]);
    f.push_back(t[15:8]); f.push_back(t[7:0]);
  endfunction

  // builds a request; corrupt flips the checksum
  task automatic request(input logic [7:0] cmd, input logic [7:0] tag, input logic [15:0] off,
                         input logic [15:0] len, input bit corrupt, input logic [15:0] etype,
                         input bit write_data);
    byte unsigned f[$];
    logic [15:0] cs;
    push_eth(f, OWN, HOST, etype);
    cs = ~oc_add(oc_add({cmd, tag}, off), len);
    if (corrupt) cs = cs ^ 16'h0100;
    f.push_back(cmd); f.push_back(tag); f.push_back(off[15:8]); f.push_back(off[7:0]);
    f.push_back(len[15:8]); f.push_back(len[7:0]); f.push_back(cs[15:8]); f.push_back(cs[7:0]);
    if (write_data) for (int i = 0; i < len; i++) begin
      byte unsigned d = 8'($urandom);
      f.push_back(d);
      if (!corrupt && etype == ET) begin
        model[16'(off + i)] = d;
        known[16'(off + i)] = 1;
      end
    end
    send_frame(f);
  endtask

  // expected reply frames for a good request
  task automatic expect_reply(input logic [7:0] cmd, input logic [7:0] tag, input logic [15:0] off,
                              input logic [15:0] len);
    int remaining = (cmd == CMD_READ_MEM) ? len : 0;
    int o = off;
    do begin
      byte unsigned f[$], body[$];
      int n = (remaining > MAXD) ? MAXD : remaining;
      logic [15:0] hl = (cmd == CMD_READ_MEM) ? 16'(n) : len;
      logic [15:0] cs;
      push_eth(f, HOST, OWN, ET);
      body.push_back(cmd | 8'h80); body.push_back(tag);
      body.push_back(8'(o >> 8)); body.push_back(8'(o));
      body.push_back(hl[15:8]); body.push_back(hl[7:0]);
      for (int i = 0; i < n; i++) body.push_back(model[16'(o + i)]);
      cs = csum_of(body);
      body.push_back(cs[15:8]); body.push_back(cs[7:0]);
      foreach (f[i]) begin exp_q.push_back(f[i]); exp_eop_q.push_back(0); end
      foreach (body[i]) begin exp_q.push_back(body[i]); exp_eop_q.push_back(i == body.size()-1); end
      remaining -= n;
      o += n;
    end while (remaining > 0);
  endtask

  // output checker with random stalls
  int got = 0;
  always @(posedge clk) if (rst_n) begin
    out_ready <= stall_en ? ($urandom_range(0, 3) != 0) : 1'b1;
    if (stat_bad) bad_seen++;
    if (stat_req) req_seen++;
    if (rst_n && out_valid && out_ready) begin
      if (exp_q.size() == 0) check(0, "unexpected reply byte");
      else begin
        byte unsigned e;
        int ee;
        e  = exp_q.pop_front();
        ee = exp_eop_q.pop_front();
        check(out_beat.data == e && out_beat.eop == (ee != 0),
              $sformatf("reply byte %0d: got %02x eop %0d, expected %02x eop %0d", got, out_beat.data, out_beat.eop, e, ee));
      end
      got++;
    end
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("in_valid %0d in_ready %0d beat %p stall %0d", in_valid, in_ready, in_beat, stall_en);
    $display("FAIL: watchdog (pending %0d, rx %0d, tx %0d, got %0d)", exp_q.size(), dut.u_rx.state, dut.u_tx.state, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_beat = '0; out_ready = 1; stall_en = 1;
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // preload memory with two writes, then read back across both
    request(CMD_WRITE_MEM, 8'h01, 16'h1000, 16'd150, 0, ET, 1);
    expect_reply(CMD_WRITE_MEM, 8'h01, 16'h1000, 16'd150);
    request(CMD_WRITE_MEM, 8'h02, 16'h1096, 16'd120, 0, ET, 1);
    expect_reply(CMD_WRITE_MEM, 8'h02, 16'h1096, 16'd120);
    request(CMD_READ_MEM, 8'h03, 16'h1000, 16'd270, 0, ET, 0);   // 3 fragments
    expect_reply(CMD_READ_MEM, 8'h03, 16'h1000, 16'd270);
    request(CMD_NOP, 8'h04, 16'h0000, 16'd0, 0, ET, 0);
    expect_reply(CMD_NOP, 8'h04, 16'h0000, 16'd0);
    // bad checksum and wrong type: no reply
    request(CMD_READ_MEM, 8'h05, 16'h1000, 16'd10, 1, ET, 0);
    request(CMD_READ_MEM, 8'h06, 16'h1000, 16'd10, 0, 16'h0800, 0);
    // odd-length read (checksum padding), wrapping at the top of memory
    request(CMD_WRITE_MEM, 8'h07, 16'hFFF0, 16'd33, 0, ET, 1);
    expect_reply(CMD_WRITE_MEM, 8'h07, 16'hFFF0, 16'd33);
    request(CMD_READ_MEM, 8'h08, 16'hFFF0, 16'd33, 0, ET, 0);
    expect_reply(CMD_READ_MEM, 8'h08, 16'hFFF0, 16'd33);
    // several reads back to back, queued in the command FIFO
    for (int r = 0; r < 6; r++) begin
      request(CMD_READ_MEM, 8'(8'h10 + r), 16'(16'h1000 + 7*r), 16'(1 + 37*r), 0, ET, 0);
      expect_reply(CMD_READ_MEM, 8'(8'h10 + r), 16'(16'h1000 + 7*r), 16'(1 + 37*r));
    end
    while (exp_q.size() != 0) @(posedge clk);
    repeat (20) @(posedge clk);
    check(!busy, "engine idle at the end");
    check(bad_seen == 1, $sformatf("one bad command counted (%0d)", bad_seen));
    check(req_seen == 12, $sformatf("12 requests queued (%0d)", req_seen));

    // rate: a 100-byte data reply with the output always ready
    stall_en = 0;
    @(posedge clk);
    request(CMD_READ_MEM, 8'h20, 16'h1000, 16'd100, 0, ET, 0);
    expect_reply(CMD_READ_MEM, 8'h20, 16'h1000, 16'd100);
    begin
      int first, last;
      wait (out_valid && out_beat.sop); @(negedge clk);
      first = got;
      wait (out_valid && out_beat.eop); @(negedge clk);
      begin
        int t0 = $time;
        last = got;
        check(last - first == 121, $sformatf("reply is 122 bytes (%0d)", last - first + 1));
      end
    end
    while (exp_q.size() != 0) @(posedge clk);
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle count of one reply frame: 122 bytes must take 122 cycles
  int   cyc = 0, frame_start = -1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (!stall_en && out_valid && out_ready && out_beat.sop) frame_start = cyc;
    if (!stall_en && out_valid && out_ready && out_beat.eop && frame_start >= 0) begin
      check(cyc - frame_start == 121, $sformatf("frame of 122 bytes in %0d cycles", cyc - frame_start + 1));
      frame_start = -1;
    end
  end

endmodule
