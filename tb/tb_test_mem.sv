// tb_test_mem: self-checking test of the dual-port test memory.
// Writes random bytes at random addresses, reads them back with the
// one-cycle read latency, and checks that a read of an address written in
// the same cycle returns the old byte.
module tb_test_mem;
  logic clk = 0;
  always #4 clk = ~clk;

  logic wr_en, rd_en;
  logic [15:0] wr_addr, rd_addr;
  logic [7:0] wr_data, rd_data;

  test_mem dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] model [int];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] addrs [200];
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      addrs[i] = (i < 2) ? (i == 0 ? 16'h0000 : 16'hFFFF) : 16'($urandom);
      wr_en = 1; wr_addr = addrs[i]; wr_data = 8'($urandom);
      model[addrs[i]] = wr_data;
      @(negedge clk);
    end
    wr_en = 0;
    for (int i = 0; i < 200; i++) begin
      rd_en = 1; rd_addr = addrs[i];
      @(negedge clk);
      check(rd_data == model[addrs[i]], $sformatf("read %h: %h vs %h", addrs[i], rd_data, model[addrs[i]]));
    end
    // read and write the same address in one cycle: old data
    rd_en = 1; rd_addr = addrs[5]; wr_en = 1; wr_addr = addrs[5]; wr_data = ~model[addrs[5]];
    @(negedge clk);
    check(rd_data == model[addrs[5]], "read during write returns old data");
    model[addrs[5]] = wr_data;
    wr_en = 0;
    @(negedge clk);
    check(rd_data == model[addrs[5]], "new data visible next cycle");
    // rd_en low holds the output
    rd_en = 0; rd_addr = addrs[6];
    @(negedge clk);
    check(rd_data == model[addrs[5]], "output held while rd_en is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
