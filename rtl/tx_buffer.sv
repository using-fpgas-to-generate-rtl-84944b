// tx_buffer: store-and-forward transmit packet buffer.
//
// Once the MAC has started sending a frame it must be fed one byte on every
// 125 MHz cycle until the end. This buffer therefore collects a whole frame
// before it offers any of it: bytes are written into a circular RAM as the
// source delivers them (in any rhythm), and the frame's length is queued when
// its end-of-packet byte arrives. Only then does the read side start, and it
// streams the frame out at one byte per cycle while out_ready is high.
//
// Interface: in_* and out_* are valid/ready byte streams with sop/eop flags.
// in_ready is low while the RAM or the length queue is full. pkt_avail is high
// while at least one complete frame is held or being read out.
// A frame must fit in the RAM (2^ADDR_W bytes); a longer one would never be
// released. The document bases its TX buffers on vendor example designs and
// gives only their purpose; the sizes here are this design's own.
module tx_buffer
  import daq_pkg::*;
#(
  parameter int ADDR_W     = 12,   // 4096-byte frame RAM
  parameter int DESC_DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  pkt_beat_t in_beat,
  input  logic      in_valid,
  output logic      in_ready,
  output pkt_beat_t out_beat,
  output logic      out_valid,
  input  logic      out_ready,
  output logic      pkt_avail
);
  localparam int DEPTH = 1 << ADDR_W;

  logic [7:0]      ram [DEPTH];
  logic [ADDR_W:0] wr_ptr, rd_ptr;
  logic [15:0]     wr_len;

  logic [15:0] desc_head;
  logic        desc_push, desc_full, desc_pop, desc_empty;
  logic [$clog2(DESC_DEPTH+1)-1:0] desc_count;

  cmd_fifo #(.WIDTH(16), .DEPTH(DESC_DEPTH)) u_desc (
    .clk, .rst_n,
    .wr_en(desc_push), .wr_data(wr_len + 16'd1), .full(desc_full),
    .rd_en(desc_pop), .rd_data(desc_head), .empty(desc_empty), .count(desc_count)
  );

  // ---------------- write side ----------------
  logic room, in_fire;
  assign room      = ((wr_ptr - rd_ptr) < (ADDR_W+1)'(DEPTH));
  assign in_ready  = room && !desc_full;
  assign in_fire   = in_valid && in_ready;
  assign desc_push = in_fire && in_beat.eop;

  always_ff @(posedge clk) begin
    if (in_fire) ram[wr_ptr[ADDR_W-1:0]] <= in_beat.data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      wr_len <= '0;
    end else if (in_fire) begin
      wr_ptr <= wr_ptr + 1'b1;
      wr_len <= in_beat.eop ? 16'd0 : wr_len + 1'b1;
    end
  end

  // ---------------- read side ----------------
  logic [15:0] rd_left;
  logic        fetch, frame_open;
  logic        p_valid, p_sop, p_eop;
  logic [7:0]  rd_q;
  pkt_beat_t   q_beat [2];
  logic [1:0]  q_cnt;
  logic        q_rp, q_wp, q_push, q_pop;

  assign frame_open = (rd_left != 0);
  assign q_push     = p_valid;
  assign q_pop      = out_valid && out_ready;
  assign fetch = (frame_open || !desc_empty) &&
                 (({1'b0, q_cnt} + {2'b0, p_valid} - {2'b0, q_pop}) < 3'd2);
  assign desc_pop = fetch && !frame_open;

  always_ff @(posedge clk) begin
    rd_q <= ram[rd_ptr[ADDR_W-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr  <= '0;
      rd_left <= '0;
      p_valid <= 1'b0;
      p_sop   <= 1'b0;
      p_eop   <= 1'b0;
    end else begin
      p_valid <= fetch;
      if (fetch) begin
        logic [15:0] left;
        left = frame_open ? rd_left : desc_head;
        p_sop   <= !frame_open;
        p_eop   <= (left == 16'd1);
        rd_left <= left - 1'b1;
        rd_ptr  <= rd_ptr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_cnt <= '0;
      q_rp  <= 1'b0;
      q_wp  <= 1'b0;
      q_beat[0] <= '0;
      q_beat[1] <= '0;
    end else begin
      if (q_push) begin
        q_beat[q_wp] <= '{data: rd_q, sop: p_sop, eop: p_eop};
        q_wp         <= !q_wp;
      end
      if (q_pop) q_rp <= !q_rp;
      q_cnt <= q_cnt + (q_push ? 2'd1 : 2'd0) - (q_pop ? 2'd1 : 2'd0);
    end
  end

  assign out_valid = (q_cnt != 0);
  assign out_beat  = q_beat[q_rp];
  assign pkt_avail = !desc_empty || frame_open || p_valid || out_valid;

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
                  out_valid && !out_ready |=> out_valid && $stable(out_beat));
  a_fits: assert property (@(posedge clk) disable iff (!rst_n)
                  !(in_valid && !room && desc_empty && !frame_open));

endmodule
