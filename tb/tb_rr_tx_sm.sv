// tb_rr_tx_sm: self-checking test of the request-response transmit machine.
// Feeds queued commands from a model FIFO and serves memory reads from a
// model memory with one cycle of latency. Checks each reply frame byte by
// byte (headers, fragment offsets and lengths, data, one's complement
// checksum) for reads that need one, several or no fragments, with random
// back-pressure; then checks that a frame flows at one byte per cycle.
module tb_rr_tx_sm;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  localparam mac_addr_t OWN = 48'h02_00_00_00_00_01;
  localparam logic [15:0] ET = 16'h88B5;
  localparam int MAXD = 64;

  rr_req_t fifo_rdata;
  logic fifo_empty, fifo_rd, mem_re, out_valid, out_ready, busy, stat_frame;
  logic [15:0] mem_addr;
  logic [7:0] mem_rdata;
  pkt_beat_t out_beat;

  rr_tx_sm dut (.clk, .rst_n, .own_mac(OWN), .etype(ET), .max_data(16'(MAXD)), .*);

  int checks = 0, failures = 0, got = 0, cyc = 0, first = 0, frames = 0;
  logic [7:0] mem [65536];
  rr_req_t q[$];
  byte unsigned exp_q[$];
  int exp_eop[$];
  bit stall = 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign fifo_empty = (q.size() == 0);
  assign fifo_rdata = fifo_empty ? '0 : q[0];
  always @(posedge clk) if (rst_n) begin
    if (fifo_rd && !fifo_empty) void'(q.pop_front());
    if (mem_re) mem_rdata <= mem[mem_addr];
  end

  task automatic expect_reply(input rr_req_t r);
    int remaining, o;
    remaining = (r.cmd == CMD_READ_MEM) ? int'(r.length) : 0;
    o = r.offset;
    do begin
      byte unsigned body[$];
      logic [15:0] acc, hl;
      int n;
      n = (remaining > MAXD) ? MAXD : remaining;
      hl = (r.cmd == CMD_READ_MEM) ? 16'(n) : r.length;
      for (int i = 5; i >= 0; i--) begin exp_q.push_back(r.reply_to[8*i +: 8]); exp_eop.push_back(0); end
      for (int i = 5; i >= 0; i--) begin exp_q.push_back(OWN[8*i +: 8]); exp_eop.push_back(0); end
      exp_q.push_back(ET[15:8]); exp_q.push_back(ET[7:0]); exp_eop.push_back(0); exp_eop.push_back(0);
      body = {r.cmd | 8'h80, r.tag, 8'(o >> 8), 8'(o), hl[15:8], hl[7:0]};
      for (int i = 0; i < n; i++) body.push_back(mem[16'(o + i)]);
      acc = 0;
      for (int i = 0; i < body.size(); i += 2)
        acc = oc_add(acc, {body[i], (i + 1 < body.size()) ? body[i+1] : 8'h00});
      acc = ~acc;
      body.push_back(acc[15:8]); body.push_back(acc[7:0]);
      foreach (body[i]) begin exp_q.push_back(body[i]); exp_eop.push_back(i == body.size() - 1); end
      remaining -= n; o += n;
    end while (remaining > 0);
  endtask

  always @(negedge clk) out_ready = stall ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out_valid && out_ready) begin
      if (out_beat.sop) first = cyc;
      if (exp_q.size() == 0) check(0, "unexpected byte");
      else begin
        byte unsigned e;
        int ee;
        e = exp_q.pop_front(); ee = exp_eop.pop_front();
        check(out_beat.data == e && out_beat.eop == (ee != 0), $sformatf("byte %0d: %02x vs %02x", got, out_beat.data, e));
      end
      if (out_beat.eop) begin
        frames++;
        if (!stall) check(cyc - first == 14 + 6 + MAXD + 2 - 1, $sformatf("full frame in %0d cycles", cyc - first + 1));
      end
      got++;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rr_req_t r;
    for (int i = 0; i < 65536; i++) mem[i] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    r = '{cmd: CMD_READ_MEM, tag: 8'h01, offset: 16'h0010, length: 16'd200, reply_to: 48'hAABBCCDDEEFF};
    q.push_back(r); expect_reply(r);
    r = '{cmd: CMD_WRITE_MEM, tag: 8'h02, offset: 16'h0020, length: 16'd33, reply_to: 48'h111111111111};
    q.push_back(r); expect_reply(r);
    r = '{cmd: CMD_READ_MEM, tag: 8'h03, offset: 16'hFFF0, length: 16'd37, reply_to: 48'h222222222222};
    q.push_back(r); expect_reply(r);
    r = '{cmd: CMD_NOP, tag: 8'h04, offset: 16'h0000, length: 16'd0, reply_to: 48'h333333333333};
    q.push_back(r); expect_reply(r);
    r = '{cmd: CMD_READ_MEM, tag: 8'h05, offset: 16'h1234, length: 16'd1, reply_to: 48'h444444444444};
    q.push_back(r); expect_reply(r);
    while (exp_q.size() != 0) @(negedge clk);
    check(frames == 8, $sformatf("8 frames (%0d)", frames));
    stall = 0;
    repeat (10) @(negedge clk);
    r = '{cmd: CMD_READ_MEM, tag: 8'h06, offset: 16'h4000, length: 16'(3 * MAXD), reply_to: 48'h555555555555};
    q.push_back(r); expect_reply(r);
    while (exp_q.size() != 0) @(negedge clk);
    repeat (5) @(negedge clk);
    check(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
