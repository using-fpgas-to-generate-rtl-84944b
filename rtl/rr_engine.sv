// rr_engine: request-response mode state machines.
//
// Serves requests from remote DAQ hosts: "write memory" requests preload the
// test memory with data patterns, "read memory" requests ask for a block of
// it (any length up to 65535 bytes, returned in as many frames as needed),
// and a "no-op" request gets an empty reply (a ping for latency tests).
// Structure, as in the document: an RX state machine that checks requests,
// writes the memory and queues the commands in a FIFO; a TX state machine
// that loops over the FIFO building replies; and the 64 KB test memory
// between them. Requests keep arriving while earlier replies are being sent;
// when the command FIFO is full the RX machine stops taking frames and the
// packet buffer in front of it absorbs them.
//
// Interface: byte streams in (requests) and out (replies), both valid/ready
// with sop/eop; configuration from the control registers.
module rr_engine
  import daq_pkg::*;
#(
  parameter int MEM_ADDR_W = 16,   // 64 KB test memory
  parameter int FIFO_DEPTH = 16,
  parameter int unsigned RR_MAX_DATA_LIMIT = 65535  // cap on max_data
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mac_addr_t   own_mac,
  input  logic [15:0] etype,
  input  logic [15:0] max_data,
  input  pkt_beat_t   in_beat,
  input  logic        in_valid,
  output logic        in_ready,
  output pkt_beat_t   out_beat,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        busy,
  output logic        stat_req,
  output logic        stat_bad,
  output logic        stat_frame
);
  logic        mem_we, mem_re;
  logic [15:0] mem_waddr, mem_raddr;
  logic [7:0]  mem_wdata, mem_rdata;
  logic        fifo_we, fifo_full, fifo_rd, fifo_empty;
  rr_req_t     fifo_wdata, fifo_rdata;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;
  logic        tx_busy;

  rr_rx_sm u_rx (
    .clk, .rst_n, .etype,
    .in_beat, .in_valid, .in_ready,
    .mem_we, .mem_addr(mem_waddr), .mem_wdata,
    .fifo_we, .fifo_wdata, .fifo_full,
    .stat_req, .stat_bad
  );

  cmd_fifo #(.WIDTH($bits(rr_req_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(fifo_we), .wr_data(fifo_wdata), .full(fifo_full),
    .rd_en(fifo_rd), .rd_data(fifo_rdata), .empty(fifo_empty), .count(fifo_count)
  );

  test_mem #(.ADDR_W(MEM_ADDR_W)) u_mem (
    .clk,
    .wr_en(mem_we), .wr_addr(mem_waddr[MEM_ADDR_W-1:0]), .wr_data(mem_wdata),
    .rd_en(mem_re), .rd_addr(mem_raddr[MEM_ADDR_W-1:0]), .rd_data(mem_rdata)
  );

  rr_tx_sm #(.MAX_DATA_LIMIT(RR_MAX_DATA_LIMIT)) u_tx (
    .clk, .rst_n, .own_mac, .etype, .max_data,
    .fifo_rdata, .fifo_empty, .fifo_rd,
    .mem_re, .mem_addr(mem_raddr), .mem_rdata,
    .out_beat, .out_valid, .out_ready,
    .busy(tx_busy), .stat_frame
  );

  assign busy = tx_busy || !fifo_empty;

endmodule
