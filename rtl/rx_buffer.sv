// rx_buffer: receive packet buffer between the Ethernet MAC and the fabric.
//
// The MAC delivers a frame at full speed, one byte per 125 MHz cycle, and
// cannot be stalled: a start-of-packet strobe with the first byte, a byte on
// every cycle with mac_rx_dv high, then a one-cycle "good" or "bad" strobe
// after the last byte (bad = failed the CRC). This buffer stores the bytes in
// a circular RAM as they arrive. On "good" the frame is committed: its length
// and Ethernet type go into a descriptor queue and the frame becomes visible
// on the read side. On "bad", or when the RAM or the descriptor queue ran out
// of room during the frame (an overflow), the write pointer is rewound and
// the frame disappears. Only complete good frames are ever read out, so the
// logic behind the buffer can work at its own pace.
//
// Read side: a valid/ready byte stream with sop/eop flags; out_etype and
// out_len describe the frame whose bytes are being presented (valid with
// out_valid). The RAM is read synchronously through a two-entry output queue,
// so a frame streams out at one byte per cycle while out_ready stays high.
//
// Follows the document: complete frames only, bad frames discarded. The RAM
// size, the descriptor queue and the overflow handling are this design's own
// choices (the document's buffers are based on vendor example designs).
module rx_buffer
  import daq_pkg::*;
#(
  parameter int ADDR_W     = 12,   // 4096-byte frame RAM
  parameter int DESC_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // MAC client receive side
  input  logic        mac_rx_sop,
  input  logic        mac_rx_dv,
  input  logic [7:0]  mac_rx_data,
  input  logic        mac_rx_good,
  input  logic        mac_rx_bad,
  // buffered frames
  output pkt_beat_t   out_beat,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [15:0] out_etype,
  output logic [15:0] out_len,
  // statistics pulses
  output logic        stat_good,
  output logic        stat_bad,
  output logic        stat_overflow
);
  localparam int DEPTH = 1 << ADDR_W;

  typedef struct packed {
    logic [15:0] len;
    logic [15:0] etype;
  } desc_t;

  logic [7:0]      ram [DEPTH];
  logic [ADDR_W:0] wr_start, wr_cur, rd_ptr;
  logic [15:0]     wr_len;
  logic [15:0]     wr_etype;
  logic            wr_ovf, in_frame;

  // descriptor queue
  desc_t desc_in, desc_head;
  logic  desc_push, desc_full, desc_pop, desc_empty;
  logic [$clog2(DESC_DEPTH+1)-1:0] desc_count;

  cmd_fifo #(.WIDTH($bits(desc_t)), .DEPTH(DESC_DEPTH)) u_desc (
    .clk, .rst_n,
    .wr_en(desc_push), .wr_data(desc_in), .full(desc_full),
    .rd_en(desc_pop), .rd_data(desc_head), .empty(desc_empty), .count(desc_count)
  );

  // ---------------- write side ----------------
  // a start of packet abandons any unterminated frame
  logic [ADDR_W:0] base, used;
  logic            room, accept;
  assign base   = mac_rx_sop ? wr_start : wr_cur;
  assign used   = base - rd_ptr;
  assign room   = (used < (ADDR_W+1)'(DEPTH));
  assign accept = mac_rx_dv && room && (mac_rx_sop || !wr_ovf);

  logic good_commit;
  assign good_commit = mac_rx_good && in_frame && !wr_ovf && !desc_full && (wr_len != 0);
  assign desc_push   = good_commit;
  assign desc_in     = '{len: wr_len, etype: wr_etype};

  always_ff @(posedge clk) begin
    if (accept) ram[base[ADDR_W-1:0]] <= mac_rx_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_start      <= '0;
      wr_cur        <= '0;
      wr_len        <= '0;
      wr_etype      <= '0;
      wr_ovf        <= 1'b0;
      in_frame      <= 1'b0;
      stat_good     <= 1'b0;
      stat_bad      <= 1'b0;
      stat_overflow <= 1'b0;
    end else begin
      stat_good     <= 1'b0;
      stat_bad      <= 1'b0;
      stat_overflow <= 1'b0;
      if (mac_rx_dv) begin
        logic [15:0] idx;
        idx = mac_rx_sop ? 16'd0 : wr_len;
        if (mac_rx_sop) begin
          in_frame <= 1'b1;
          wr_ovf   <= !room;
        end else if (!room) begin
          wr_ovf <= 1'b1;
        end
        wr_cur <= accept ? base + 1'b1 : base;
        wr_len <= idx + 1'b1;
        if (idx == 16'd12) wr_etype[15:8] <= mac_rx_data;
        if (idx == 16'd13) wr_etype[7:0]  <= mac_rx_data;
      end else if (mac_rx_good || mac_rx_bad) begin
        in_frame <= 1'b0;
        wr_len   <= '0;
        wr_ovf   <= 1'b0;
        if (good_commit) begin
          wr_start  <= wr_cur;
          stat_good <= 1'b1;
        end else begin
          wr_cur <= wr_start;
          if (mac_rx_bad) stat_bad <= 1'b1;
          else if (in_frame) stat_overflow <= 1'b1;
        end
      end
    end
  end

  // ---------------- read side ----------------
  // rd_left: bytes of the head frame still to fetch (0 = no frame open)
  logic [15:0] rd_left;
  logic        fetch;
  logic        p_valid;        // RAM data arrives this cycle
  logic        p_sop, p_eop;
  logic [7:0]  rd_q;

  // two-entry output queue
  pkt_beat_t   q_beat [2];
  logic [15:0] q_etype [2];
  logic [15:0] q_len [2];
  logic [1:0]  q_cnt;
  logic        q_rp, q_wp;
  logic        frame_open;
  logic [15:0] cur_etype, cur_len;

  assign frame_open = (rd_left != 0);
  assign fetch = (frame_open || !desc_empty) &&
                 (({1'b0, q_cnt} + {2'b0, p_valid} - {2'b0, out_valid && out_ready}) < 3'd2);
  assign desc_pop = fetch && !frame_open;

  always_ff @(posedge clk) begin
    rd_q <= ram[rd_ptr[ADDR_W-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr    <= '0;
      rd_left   <= '0;
      p_valid   <= 1'b0;
      p_sop     <= 1'b0;
      p_eop     <= 1'b0;
      cur_etype <= '0;
      cur_len   <= '0;
    end else begin
      p_valid <= fetch;
      if (fetch) begin
        logic [15:0] left;
        left = frame_open ? rd_left : desc_head.len;
        if (!frame_open) begin
          cur_etype <= desc_head.etype;
          cur_len   <= desc_head.len;
        end
        p_sop   <= !frame_open;
        p_eop   <= (left == 16'd1);
        rd_left <= left - 1'b1;
        rd_ptr  <= rd_ptr + 1'b1;
      end
    end
  end

  logic q_push, q_pop;
  assign q_push = p_valid;
  assign q_pop  = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_cnt <= '0;
      q_rp  <= 1'b0;
      q_wp  <= 1'b0;
      for (int i = 0; i < 2; i++) begin
        q_beat[i]  <= '0;
        q_etype[i] <= '0;
        q_len[i]   <= '0;
      end
    end else begin
      if (q_push) begin
        q_beat[q_wp]  <= '{data: rd_q, sop: p_sop, eop: p_eop};
        q_etype[q_wp] <= cur_etype;
        q_len[q_wp]   <= cur_len;
        q_wp          <= !q_wp;
      end
      if (q_pop) q_rp <= !q_rp;
      q_cnt <= q_cnt + (q_push ? 2'd1 : 2'd0) - (q_pop ? 2'd1 : 2'd0);
    end
  end

  assign out_valid = (q_cnt != 0);
  assign out_beat  = q_beat[q_rp];
  assign out_etype = q_etype[q_rp];
  assign out_len   = q_len[q_rp];

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
                  out_valid && !out_ready |=> out_valid && $stable(out_beat));

endmodule
