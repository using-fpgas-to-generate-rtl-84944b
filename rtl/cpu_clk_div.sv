// cpu_clk_div: clock divider for the embedded CPU.
//
// Divides the board's 50 MHz crystal clock by DIV (default 4) to give the
// 12.5 MHz clock the soft CPU runs on, with a 50 % duty cycle for even DIV.
// The output comes straight from a flip-flop; on an FPGA it should be routed
// onto a global clock buffer. The division ratio is the document's
// (50 MHz divided down to 12.5 MHz); the counter is this design's own.
module cpu_clk_div #(
  parameter int DIV = 4
) (
  input  logic clk_50,
  input  logic rst_n,
  output logic clk_cpu
);
  localparam int CW = (DIV > 2) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk_50 or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_cpu <= 1'b0;
    end else if (cnt == CW'(DIV/2 - 1) || cnt == CW'(DIV - 1)) begin
      cnt     <= (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
      clk_cpu <= !clk_cpu;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
