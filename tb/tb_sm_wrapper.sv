// tb_sm_wrapper: self-checking test of the state-machine wrapper.
// In generator mode runs the packet generator and checks its frames reach
// the transmit stream and that received frames are absorbed. Then switches
// to request-response mode while a generated frame is in flight and checks
// the switch waits for the end of that frame (every transmitted frame is
// whole), then sends a write and a read request and checks the replies and
// that the generator stays held off. Finally switches back, restarts the
// generator and checks that requests are then absorbed without a reply.
module tb_sm_wrapper;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  cfg_t cfg;
  logic gen_start, gen_stop, rx_valid, rx_ready, tx_valid, tx_ready;
  logic gen_busy, mode_now, mode_switch, stat_req, stat_bad;
  pkt_beat_t rx_beat, tx_beat;
  logic [31:0] gen_sent;

  sm_wrapper #(.MEM_ADDR_W(10), .FIFO_DEPTH(4)) dut (.*);

  int checks = 0, failures = 0, switches = 0, gen_frames = 0, rr_frames = 0, reqs = 0;
  int gen_at_switch;
  byte unsigned cur[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input byte unsigned f[$]);
    bit r;
    for (int i = 0; i < f.size(); i++) begin
      rx_beat = '{data: f[i], sop: i == 0, eop: i == f.size()-1};
      rx_valid = 1;
      do begin #1 r = rx_ready; @(negedge clk); end while (!r);
    end
    rx_valid = 0;
  endtask

  task automatic req(input logic [7:0] cmd, input logic [15:0] off, input logic [15:0] len,
                     input byte unsigned data[$]);
    byte unsigned f[$];
    logic [15:0] cs;
    f = {8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h01, 8'h00, 8'h11, 8'h22, 8'h33, 8'h44, 8'h55,
         8'h88, 8'hB5};
    cs = ~oc_add(oc_add({cmd, 8'h09}, off), len);
    f = {f, cmd, 8'h09, off[15:8], off[7:0], len[15:8], len[7:0], cs[15:8], cs[7:0]};
    f = {f, data};
    send(f);
  endtask

  always @(negedge clk) tx_ready = ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n) begin
    if (mode_switch) switches++;
    if (stat_req) reqs++;
    if (tx_valid && tx_ready) begin
      if (tx_beat.sop) cur = {};
      cur.push_back(tx_beat.data);
      if (tx_beat.eop) begin
        if (cur.size() >= 15 && cur[14] >= 8'h80) begin
          rr_frames++;
          if (cur[14] == 8'h82) check(cur.size() == 22 && {cur[18], cur[19]} == 16'd8, "write reply");
          if (cur[14] == 8'h81) begin
            check(cur.size() == 30, "read reply size");
            for (int i = 0; i < 8; i++) check(cur[20 + i] == 8'(8'hA0 + i), "read reply data");
          end
        end else begin
          gen_frames++;
          check(cur.size() == 14 + 50, $sformatf("generated frame whole (%0d bytes)", cur.size()));
        end
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

  byte unsigned none[$];

  initial begin
    cfg = '0;
    cfg.own_mac = 48'h02_00_00_00_00_01; cfg.sm_etype = 16'h88B5; cfg.rr_max_data = 16'd1492;
    cfg.gen_len = 50; cfg.gen_count = 100; cfg.gen_delay = 100; cfg.gen_ndest = 1;
    gen_start = 0; gen_stop = 0; rx_valid = 0; rx_beat = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    gen_start = 1; @(negedge clk); gen_start = 0;
    // a frame arriving in generator mode is absorbed
    req(CMD_NOP, 0, 0, none);
    repeat (300) @(negedge clk);
    // switch in the middle of a generated frame
    while (!(tx_valid && !tx_beat.sop)) @(negedge clk);
    cfg.sm_mode = 1;
    @(negedge clk);
    check(!mode_now, "mode held during a frame");
    while (!mode_now) @(negedge clk);
    @(negedge clk);
    check(switches == 1, "one mode switch");
    gen_at_switch = gen_frames;
    gen_stop = 1; @(negedge clk); gen_stop = 0;
    req(CMD_WRITE_MEM, 16'h0040, 16'd8, {8'hA0, 8'hA1, 8'hA2, 8'hA3, 8'hA4, 8'hA5, 8'hA6, 8'hA7});
    req(CMD_READ_MEM, 16'h0040, 16'd8, none);
    repeat (200) @(negedge clk);
    check(gen_frames >= 3, $sformatf("generated frames %0d", gen_frames));
    check(rr_frames == 2, $sformatf("reply frames %0d", rr_frames));
    check(stat_bad == 0, "no bad request");
    check(reqs == 2, $sformatf("requests queued %0d", reqs));
    check(gen_frames == gen_at_switch, "generator held off in request-response mode");
    // back to the generator
    cfg.sm_mode = 0;
    while (mode_now) @(negedge clk);
    @(negedge clk);
    check(switches == 2, "switched back");
    gen_start = 1; @(negedge clk); gen_start = 0;
    req(CMD_READ_MEM, 16'h0040, 16'd8, none);
    repeat (600) @(negedge clk);
    check(gen_frames >= gen_at_switch + 3, $sformatf("generator resumed (%0d frames)", gen_frames - gen_at_switch));
    check(rr_frames == 2 && reqs == 2, "request absorbed in generator mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
