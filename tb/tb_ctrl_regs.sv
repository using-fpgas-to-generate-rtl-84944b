// tb_ctrl_regs: self-checking test of the control and status registers.
// Checks reset values, big-endian multi-byte fields, the destination table,
// the start/stop pulses, read-back of status and the event counters.
module tb_ctrl_regs;
  import daq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  logic [7:0] reg_addr, reg_wdata, reg_rdata;
  logic reg_we, gen_start, gen_stop, gen_busy;
  logic [31:0] gen_sent;
  logic [6:0] events;
  cfg_t cfg;

  ctrl_regs dut (.*);

  int checks = 0, failures = 0, starts = 0, stops = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    reg_addr = a; reg_wdata = d; reg_we = 1;
    @(negedge clk);
    reg_we = 0;
  endtask
  task automatic rd(input logic [7:0] a, output logic [7:0] d);
    reg_addr = a;
    #1 d = reg_rdata;
  endtask
  logic [7:0] v1, v2;

  always @(posedge clk) if (rst_n) begin
    if (gen_start) starts++;
    if (gen_stop) stops++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reg_addr = 0; reg_wdata = 0; reg_we = 0; gen_busy = 0; gen_sent = 0; events = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cfg.gen_len == 16'd1500 && cfg.gen_delay == 32'd1500 && cfg.gen_count == 32'd1, "generator reset values");
    check(cfg.sm_etype == 16'h88B5 && cfg.cpu_etype == 16'h88B6 && cfg.rr_max_data == 16'd1492, "type and reply size resets");
    check(cfg.own_mac == 48'h02_00_00_00_00_01 && cfg.gen_ndest == 5'd1, "MAC and destination count resets");
    check(cfg.sm_chan_en && cfg.cpu_chan_en && !cfg.cpu_take_all && !cfg.sm_mode, "filter and mode resets");
    wr(8'h04, 8'h12); wr(8'h05, 8'h34); wr(8'h06, 8'h56); wr(8'h07, 8'h78);
    check(cfg.gen_count == 32'h12345678, "GEN_COUNT big-endian");
    rd(8'h05, v1); check(v1 == 8'h34, "GEN_COUNT read back");
    wr(8'h12, 8'hFF); wr(8'h13, 8'hFF);
    check(cfg.tx_ratio == 16'hFFFF, "TX_RATIO");
    for (int d = 0; d < 16; d++)
      for (int b = 0; b < 6; b++) wr(8'(8'h40 + 6*d + b), 8'(d * 16 + b));
    for (int d = 0; d < 16; d++)
      check(cfg.dest[d] == {8'(d*16), 8'(d*16+1), 8'(d*16+2), 8'(d*16+3), 8'(d*16+4), 8'(d*16+5)},
            $sformatf("DEST[%0d]", d));
    wr(8'h10, 8'd0);  check(cfg.gen_ndest == 5'd1, "NDEST 0 reads as 1");
    wr(8'h10, 8'd40); check(cfg.gen_ndest == 5'd16, "NDEST clipped to 16");
    wr(8'h10, 8'd7);  check(cfg.gen_ndest == 5'd7, "NDEST 7");
    wr(8'h00, 8'h0B);    // mode 1, start, random
    check(cfg.sm_mode && cfg.gen_random, "CTRL mode and data bits");
    rd(8'h00, v1); check(v1 == 8'h09, "CTRL pulse bits read as 0");
    wr(8'h00, 8'h04);
    @(negedge clk);
    check(starts == 1 && stops == 1, "start and stop pulses");
    check(!cfg.sm_mode, "CTRL rewritten");
    gen_busy = 1; gen_sent = 32'hA1B2C3D4;
    rd(8'h01, v1); check(v1 == 8'h01, "STATUS busy");
    rd(8'h26, v1); rd(8'h29, v2); check(v1 == 8'hA1 && v2 == 8'hD4, "GEN_SENT");
    for (int i = 0; i < 300; i++) begin
      events = 7'b1000001;
      @(negedge clk);
    end
    events = 0;
    rd(8'h30, v1); rd(8'h31, v2); check({v1, v2} == 16'd300, "RX good counter");
    rd(8'h3C, v1); rd(8'h3D, v2); check({v1, v2} == 16'd300, "CPU frame counter");
    rd(8'h32, v1); rd(8'h33, v2); check({v1, v2} == 16'd0, "RX bad counter untouched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
