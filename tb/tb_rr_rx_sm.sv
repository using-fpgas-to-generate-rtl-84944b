// tb_rr_rx_sm: self-checking test of the request-response receive machine.
// Sends write, read and no-op requests, a request with a bad checksum, one
// with an unknown command, one of the wrong Ethernet type and a write whose
// frame is cut short, with the command FIFO refusing entries at random.
// Checks every memory write (address and data) and every queued command
// against values computed here, and the bad-command count.
module tb_rr_rx_sm;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  localparam logic [15:0] ET = 16'h88B5;
  localparam mac_addr_t HOST = 48'h00_11_22_33_44_55;

  pkt_beat_t in_beat;
  logic in_valid, in_ready, mem_we, fifo_we, fifo_full, stat_req, stat_bad;
  logic [15:0] mem_addr;
  logic [7:0] mem_wdata;
  rr_req_t fifo_wdata;

  rr_rx_sm dut (.clk, .rst_n, .etype(ET), .*);

  int checks = 0, failures = 0, bads = 0;
  rr_req_t exp_fifo[$];
  logic [23:0] exp_wr[$];     // {addr, data}

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input byte unsigned f[$]);
    bit r;
    for (int i = 0; i < f.size(); i++) begin
      in_beat = '{data: f[i], sop: i == 0, eop: i == f.size()-1};
      in_valid = 1;
      do begin #1 r = in_ready; @(negedge clk); end while (!r);
    end
    in_valid = 0;
    repeat (2) @(negedge clk);
  endtask

  // good=0 corrupts the checksum; cut>0 drops that many data bytes
  task automatic req(input logic [7:0] cmd, input logic [15:0] off, input logic [15:0] len,
                     input bit good, input logic [15:0] et, input int cut);
    byte unsigned f[$];
    logic [15:0] cs;
    int nd;
    for (int i = 0; i < 6; i++) f.push_back(8'h02);
    for (int i = 5; i >= 0; i--) f.push_back(HOST[8*i +: 8]);
    f.push_back(et[15:8]); f.push_back(et[7:0]);
    cs = ~oc_add(oc_add({cmd, 8'h77}, off), len);
    if (!good) cs = ~cs;
    f.push_back(cmd); f.push_back(8'h77); f.push_back(off[15:8]); f.push_back(off[7:0]);
    f.push_back(len[15:8]); f.push_back(len[7:0]); f.push_back(cs[15:8]); f.push_back(cs[7:0]);
    nd = (cmd == CMD_WRITE_MEM) ? int'(len) - cut : 0;
    for (int i = 0; i < nd; i++) begin
      byte unsigned d;
      d = 8'($urandom);
      f.push_back(d);
      if (good && et == ET) exp_wr.push_back({16'(off + i), d});
    end
    if (cmd != CMD_WRITE_MEM) f.push_back(8'h00);   // padding byte is ignored
    if (good && et == ET && cmd <= 8'h02)
      exp_fifo.push_back('{cmd: cmd, tag: 8'h77, offset: off,
                           length: (cmd == CMD_WRITE_MEM) ? 16'(nd) : len, reply_to: HOST});
    send(f);
  endtask

  always @(negedge clk) fifo_full = ($urandom_range(0, 2) == 0);

  always @(posedge clk) if (rst_n) begin
    if (stat_bad) bads++;
    if (mem_we) begin
      check(exp_wr.size() > 0 && {mem_addr, mem_wdata} == exp_wr[0],
            $sformatf("memory write %h:%h", mem_addr, mem_wdata));
      if (exp_wr.size() > 0) void'(exp_wr.pop_front());
    end
    if (fifo_we && !fifo_full) begin
      check(exp_fifo.size() > 0 && fifo_wdata == exp_fifo[0], "queued command");
      if (exp_fifo.size() > 0) void'(exp_fifo.pop_front());
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
    req(CMD_WRITE_MEM, 16'h0100, 16'd40, 1, ET, 0);
    req(CMD_READ_MEM,  16'h0100, 16'd3000, 1, ET, 0);
    req(CMD_NOP,       16'h0000, 16'd0, 1, ET, 0);
    req(CMD_WRITE_MEM, 16'h0200, 16'd20, 0, ET, 0);     // bad checksum
    req(8'h33,         16'h0000, 16'd0, 1, ET, 0);      // unknown command
    req(CMD_READ_MEM,  16'h0000, 16'd10, 1, 16'h0800, 0); // other type
    req(CMD_WRITE_MEM, 16'hFFFC, 16'd30, 1, ET, 12);    // short frame, wraps
    for (int i = 0; i < 5; i++) req(CMD_WRITE_MEM, 16'(i * 100), 16'(1 + i * 7), 1, ET, 0);
    repeat (20) @(negedge clk);
    check(exp_wr.size() == 0, "all memory writes seen");
    check(exp_fifo.size() == 0, "all commands queued");
    check(bads == 2, $sformatf("bad commands %0d", bads));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
