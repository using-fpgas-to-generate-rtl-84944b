// rr_tx_sm: transmit state machine of the request-response engine.
//
// Takes queued requests from the command FIFO and answers each with one or
// more reply frames. States, as in the document's transmit state diagram:
//   IDLE        -> SEND_HDR    when a command is in the FIFO
//   SEND_HDR    -> CHECK_CMD   Ethernet header and reply header sent
//   CHECK_CMD   -> SEND_MEM    the command requires data, else SEND_XSUM
//   SEND_MEM    -> ALL_SENT    frame full (rr_max_data) or byte count done
//   ALL_SENT    -> SEND_XSUM   (notes whether more data remains)
//   SEND_XSUM   -> END_PKT     checksum sent, frame closed
//   END_PKT     -> UPDATE_CNT  more data to send, else IDLE
//   UPDATE_CNT  -> SEND_HDR    next fragment: offset and count advanced
// A read of any length up to 65535 bytes is thus cut into frames of at most
// rr_max_data data bytes (itself capped at MAX_DATA_LIMIT so that a reply
// frame always fits the transmit buffer behind the engine), each with its
// own header (offset and length of the data it carries) and its own
// checksum. Each frame ends with the 16-bit one's
// complement of the one's complement sum of all bytes after the Ethernet
// header (big-endian pairs, an odd last byte padded with zero).
//
// Pipeline: the state machine issues one byte "recipe" per cycle (a constant,
// a memory address or a checksum half); one cycle later the byte is resolved
// (memory data arrives, the checksum is accumulated) and enters a four-entry
// output queue. Issue stops when the queue could overflow, so out_ready may
// be dropped at any time. A frame is offered once three of its bytes are
// queued; from then on, with out_ready high, it flows at one byte per cycle.
//
// The document gives the states and the checksum method. In the diagram the
// "more data to send" branch leaves from ALL_SENT; here the decision is made
// in ALL_SENT but taken after the checksum and end of frame, since every
// fragment is a complete Ethernet frame. Reply layout: see daq_pkg.
module rr_tx_sm
  import daq_pkg::*;
#(
  parameter int unsigned MAX_DATA_LIMIT = 65535  // most data a reply frame may carry
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mac_addr_t   own_mac,
  input  logic [15:0] etype,
  input  logic [15:0] max_data,
  // command FIFO read side
  input  rr_req_t     fifo_rdata,
  input  logic        fifo_empty,
  output logic        fifo_rd,
  // test memory read port
  output logic        mem_re,
  output logic [15:0] mem_addr,
  input  logic [7:0]  mem_rdata,
  // reply frames
  output pkt_beat_t   out_beat,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        busy,
  output logic        stat_frame     // pulse per reply frame issued
);
  typedef enum logic [2:0] {
    T_IDLE, T_SEND_HDR, T_CHECK_CMD, T_SEND_MEM, T_ALL_SENT, T_SEND_XSUM, T_END_PKT, T_UPDATE_CNT
  } tstate_e;
  typedef enum logic [1:0] {K_LIT, K_MEM, K_XHI, K_XLO} kind_e;
  typedef struct packed {
    kind_e      kind;
    logic [7:0] lit;
    logic       sop, eop, summed;
  } item_t;

  tstate_e     state;
  rr_req_t     req;
  logic [16:0] remaining;        // data bytes still to send for this request
  logic [15:0] frag_off, frag_len, cnt, max_eff;
  logic [4:0]  k;
  logic        more;

  assign max_eff = (max_data == 16'd0) ? 16'd1 :
                   (32'(max_data) > MAX_DATA_LIMIT) ? 16'(MAX_DATA_LIMIT) : max_data;

  function automatic logic [15:0] min_len(input logic [16:0] rem, input logic [15:0] mx);
    return (rem > {1'b0, mx}) ? mx : rem[15:0];
  endfunction

  // ---------------- output queue and credit ----------------
  localparam int QD = 4;
  pkt_beat_t q [QD];
  logic [2:0] q_cnt;
  logic [1:0] q_rp, q_wp;
  logic       q_pop, p_valid, can_issue, issue;
  item_t      it, p_it;

  assign q_pop     = out_valid && out_ready;
  assign can_issue = ({1'b0, q_cnt} + {3'b0, p_valid} - {3'b0, q_pop}) < 4'(QD);

  // ---------------- issue stage ----------------
  logic [15:0] hdr_len;
  assign hdr_len = (req.cmd == CMD_READ_MEM) ? frag_len : req.length;

  always_comb begin
    it    = '{kind: K_LIT, lit: 8'h00, sop: 1'b0, eop: 1'b0, summed: 1'b0};
    issue = 1'b0;
    unique case (state)
      T_SEND_HDR: begin
        issue = can_issue;
        it.sop    = (k == 5'd0);
        it.summed = (k >= 5'd14);
        unique case (k)
          5'd0:  it.lit = req.reply_to[47:40];
          5'd1:  it.lit = req.reply_to[39:32];
          5'd2:  it.lit = req.reply_to[31:24];
          5'd3:  it.lit = req.reply_to[23:16];
          5'd4:  it.lit = req.reply_to[15:8];
          5'd5:  it.lit = req.reply_to[7:0];
          5'd6:  it.lit = own_mac[47:40];
          5'd7:  it.lit = own_mac[39:32];
          5'd8:  it.lit = own_mac[31:24];
          5'd9:  it.lit = own_mac[23:16];
          5'd10: it.lit = own_mac[15:8];
          5'd11: it.lit = own_mac[7:0];
          5'd12: it.lit = etype[15:8];
          5'd13: it.lit = etype[7:0];
          5'd14: it.lit = req.cmd | REPLY_FLAG;
          5'd15: it.lit = req.tag;
          5'd16: it.lit = frag_off[15:8];
          5'd17: it.lit = frag_off[7:0];
          5'd18: it.lit = hdr_len[15:8];
          default: it.lit = hdr_len[7:0];
        endcase
      end
      T_SEND_MEM: begin
        issue     = can_issue;
        it.kind   = K_MEM;
        it.summed = 1'b1;
      end
      T_SEND_XSUM: begin
        issue   = can_issue;
        it.kind = (k == 5'd0) ? K_XHI : K_XLO;
        it.eop  = (k != 5'd0);
      end
      default: ;
    endcase
  end

  assign mem_re   = issue && (state == T_SEND_MEM);
  assign mem_addr = frag_off + cnt;
  assign fifo_rd  = (state == T_IDLE) && !fifo_empty;
  assign busy     = (state != T_IDLE) || p_valid || out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= T_IDLE;
      req        <= '0;
      remaining  <= '0;
      frag_off   <= '0;
      frag_len   <= '0;
      cnt        <= '0;
      k          <= '0;
      more       <= 1'b0;
      stat_frame <= 1'b0;
    end else begin
      stat_frame <= 1'b0;
      unique case (state)
        T_IDLE: if (!fifo_empty) begin
          logic [16:0] rem;
          rem       = (fifo_rdata.cmd == CMD_READ_MEM) ? {1'b0, fifo_rdata.length} : 17'd0;
          req       <= fifo_rdata;
          remaining <= rem;
          frag_off  <= fifo_rdata.offset;
          frag_len  <= min_len(rem, max_eff);
          k         <= '0;
          state     <= T_SEND_HDR;
        end
        T_SEND_HDR: if (issue) begin
          k <= k + 1'b1;
          if (k == 5'd19) begin
            state <= T_CHECK_CMD;
            stat_frame <= 1'b1;
          end
        end
        T_CHECK_CMD: begin
          cnt   <= '0;
          k     <= '0;
          state <= (frag_len != 0) ? T_SEND_MEM : T_SEND_XSUM;
        end
        T_SEND_MEM: if (issue) begin
          cnt <= cnt + 1'b1;
          if (cnt + 16'd1 == frag_len) state <= T_ALL_SENT;
        end
        T_ALL_SENT: begin
          remaining <= remaining - {1'b0, frag_len};
          more      <= (remaining != {1'b0, frag_len});
          k         <= '0;
          state     <= T_SEND_XSUM;
        end
        T_SEND_XSUM: if (issue) begin
          k <= k + 1'b1;
          if (k != 5'd0) state <= T_END_PKT;
        end
        T_END_PKT: state <= more ? T_UPDATE_CNT : T_IDLE;
        T_UPDATE_CNT: begin
          frag_off <= frag_off + frag_len;
          frag_len <= min_len(remaining, max_eff);
          more     <= 1'b0;
          k        <= '0;
          state    <= T_SEND_HDR;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // ---------------- resolve stage: memory data and checksum ----------------
  logic [15:0] acc, xsum;
  logic [7:0]  hi;
  logic        odd;
  logic [7:0]  b;
  logic [15:0] final_sum;

  assign final_sum = odd ? oc_add(acc, {hi, 8'h00}) : acc;

  always_comb begin
    unique case (p_it.kind)
      K_MEM:   b = mem_rdata;
      K_XHI:   b = ~final_sum[15:8];
      K_XLO:   b = xsum[7:0];
      default: b = p_it.lit;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p_it    <= '0;
      acc     <= '0;
      hi      <= '0;
      odd     <= 1'b0;
      xsum    <= '0;
      q_cnt   <= '0;
      q_rp    <= '0;
      q_wp    <= '0;
      for (int i = 0; i < QD; i++) q[i] <= '0;
    end else begin
      p_valid <= issue;
      if (issue) p_it <= it;
      if (p_valid) begin
        q[q_wp] <= '{data: b, sop: p_it.sop, eop: p_it.eop};
        q_wp    <= q_wp + 1'b1;
        if (p_it.kind == K_XHI) begin
          xsum <= ~final_sum;
        end else if (p_it.kind == K_XLO) begin
          acc <= '0;
          odd <= 1'b0;
        end else if (p_it.summed) begin
          if (!odd) hi <= b;
          else      acc <= oc_add(acc, {hi, b});
          odd <= !odd;
        end
      end
      if (q_pop) q_rp <= q_rp + 1'b1;
      q_cnt <= q_cnt + (p_valid ? 3'd1 : 3'd0) - (q_pop ? 3'd1 : 3'd0);
    end
  end

  // A frame is offered only once three bytes are queued: this lead covers
  // the two issue bubbles of a frame (CHECK_CMD and ALL_SENT), so the frame
  // then flows without gaps.
  logic in_frame;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     in_frame <= 1'b0;
    else if (q_pop) in_frame <= !out_beat.eop;
  end
  assign out_valid = (q_cnt != 0) && (in_frame || q_cnt >= 3'd3);
  assign out_beat  = q[q_rp];

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
                  out_valid && !out_ready |=> out_valid && $stable(out_beat));

endmodule
