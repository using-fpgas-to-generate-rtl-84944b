// tb_cpu_clk_div: self-checking test of the CPU clock divider.
// 50 MHz in, checks that the output toggles every 2 input cycles, giving
// 12.5 MHz (80 ns period) with a 50 % duty cycle.
module tb_cpu_clk_div;
  timeunit 1ns; timeprecision 1ps;
  logic clk_50 = 0, rst_n = 0, clk_cpu;
  always #10 clk_50 = ~clk_50;

  cpu_clk_div dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t_rise, t_fall, t_prev;
    repeat (3) @(posedge clk_50);
    rst_n = 1;
    @(posedge clk_cpu); t_prev = $realtime;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk_cpu); t_fall = $realtime;
      @(posedge clk_cpu); t_rise = $realtime;
      check(t_rise - t_prev == 80.0, $sformatf("period %0.1f ns", t_rise - t_prev));
      check(t_fall - t_prev == 40.0, $sformatf("high time %0.1f ns", t_fall - t_prev));
      t_prev = t_rise;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
