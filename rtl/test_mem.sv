// test_mem: test memory of the request-response engine.
//
// A simple dual-port byte RAM, 64 KB by default: the RX state machine writes
// the data of "write memory" requests through port A, the TX state machine
// reads reply data through port B. Port B is synchronous: rd_data holds the
// byte at the address presented on the previous clock edge with rd_en high.
// A read and a write of the same address in one cycle return the old byte.
// The contents are not reset; a host preloads them with write requests.
// The document gives the size ("64Kbytes of RAM", "up to 64KBytes"); the
// two-port organisation is this design's own choice.
module test_mem #(
  parameter int ADDR_W = 16
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [7:0]        wr_data,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [7:0]        rd_data
);
  logic [7:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
