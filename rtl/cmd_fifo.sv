// cmd_fifo: synchronous first-word-fall-through FIFO.
//
// In the request-response engine it is the command FIFO that links the RX
// state machine to the TX state machine: the RX machine queues each accepted
// request (command, tag, memory offset, length and the requester's MAC
// address), the TX machine takes them in order and answers them. The same
// module also serves as the frame-descriptor queue inside the packet buffers.
//
// Interface: wr_en writes wr_data when not full; rd_data always shows the
// oldest entry when not empty, rd_en removes it. Writes into a full FIFO and
// reads from an empty one are ignored (and flagged by assertions). A write and
// a read may happen in the same cycle. One cycle from write to empty=0.
//
// The document gives only the FIFO's role; its depth (16 entries) is this
// design's own choice.
module cmd_fifo #(
  parameter int WIDTH = 96,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty   = (count == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= inc(wp);
      if (do_rd) rp <= inc(rp);
      count <= count + (do_wr ? CW'(1) : CW'(0)) - (do_rd ? CW'(1) : CW'(0));
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));

endmodule
