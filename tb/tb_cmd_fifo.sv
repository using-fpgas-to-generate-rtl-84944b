// tb_cmd_fifo: self-checking test of the synchronous FIFO.
// Random writes and reads against a queue model; checks data order, the
// full/empty flags and the entry count, and that writes into a full FIFO
// are refused.
module tb_cmd_fifo;
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;

  localparam int W = 20, D = 5;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D+1)-1:0] count;

  cmd_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int saw_full = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      check(count == model.size(), "count");
      if (!empty) check(rd_data == model[0], $sformatf("head %h vs %h", rd_data, model[0]));
      if (full) saw_full++;
      // phases: fill-heavy then drain-heavy
      wr_en   = ($urandom_range(0, 99) < ((cyc / 200) % 2 ? 30 : 70)) && !full;
      rd_en   = ($urandom_range(0, 99) < ((cyc / 200) % 2 ? 70 : 30)) && !empty;
      wr_data = W'($urandom);
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    check(saw_full > 0, "FIFO reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
