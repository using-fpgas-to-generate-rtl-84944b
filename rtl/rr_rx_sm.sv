// rr_rx_sm: receive state machine of the request-response engine.
//
// Reads request frames from the state-machine channel of the packet filter,
// one byte per cycle. States, as in the document's receive state diagram:
//   IDLE       -> READ_HDR  when a frame is queued
//   READ_HDR   -> READ_CMD  correct Ethernet type, else EMPTY_PKT
//   READ_CMD   -> CHECK_CMD when all 8 command bytes have arrived
//   CHECK_CMD  -> DO_CMD    good command, else EMPTY_PKT (bad command)
//   DO_CMD     -> WRITE_MEM for a memory write, else FILL_FIFO
//   WRITE_MEM  -> FILL_FIFO when the write has finished
//   FILL_FIFO  -> EMPTY_PKT once the request is in the command FIFO
//   EMPTY_PKT  -> IDLE      at the end of the frame (rest is discarded)
// A command is good when its code is known and its checksum is right: the
// one's complement sum of the words {cmd,tag}, offset, length and the
// checksum word must be 0xFFFF. A write stores 'length' data bytes at
// 'offset' (wrapping in the 64 KB memory); if the frame ends early only the
// bytes present are written and the queued length says how many. Every good
// command, including a write, is queued so that it gets a reply.
// The FIFO entry holds command, tag, offset, length and the requester's MAC.
//
// The state sequence comes from the document; the request layout (see
// daq_pkg), the scope of the checksum (the command header) and the handling
// of short frames are this design's own choices.
module rr_rx_sm
  import daq_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] etype,        // expected Ethernet type
  // request frames
  input  pkt_beat_t   in_beat,
  input  logic        in_valid,
  output logic        in_ready,
  // test memory write port
  output logic        mem_we,
  output logic [15:0] mem_addr,
  output logic [7:0]  mem_wdata,
  // command FIFO write side
  output logic        fifo_we,
  output rr_req_t     fifo_wdata,
  input  logic        fifo_full,
  // statistics pulses
  output logic        stat_req,
  output logic        stat_bad
);
  typedef enum logic [2:0] {
    R_IDLE, R_READ_HDR, R_READ_CMD, R_CHECK_CMD, R_DO_CMD, R_WRITE_MEM, R_FILL_FIFO, R_EMPTY_PKT
  } rstate_e;
  rstate_e state;

  logic [3:0]  idx;
  mac_addr_t   src;
  logic [7:0]  type_hi;
  logic [7:0]  cmd, tag;
  logic [15:0] offset, length, csum, done_cnt;
  logic        seen_eop;
  logic        fire;

  assign fire = in_valid && in_ready;

  always_comb begin
    unique case (state)
      R_IDLE:      in_ready = in_valid && !in_beat.sop;   // drop stray bytes
      R_READ_HDR, R_READ_CMD, R_WRITE_MEM: in_ready = 1'b1;
      R_EMPTY_PKT: in_ready = !seen_eop;
      default:     in_ready = 1'b0;
    endcase
  end

  // header check
  logic [15:0] sum;
  logic        cmd_known, cmd_good;
  assign sum       = oc_add(oc_add(oc_add({cmd, tag}, offset), length), csum);
  assign cmd_known = (cmd == CMD_NOP) || (cmd == CMD_READ_MEM) || (cmd == CMD_WRITE_MEM);
  assign cmd_good  = cmd_known && (sum == 16'hFFFF);

  assign mem_we    = (state == R_WRITE_MEM) && fire && (done_cnt != length);
  assign mem_addr  = offset + done_cnt;
  assign mem_wdata = in_beat.data;

  assign fifo_we    = (state == R_FILL_FIFO) && !fifo_full;
  assign fifo_wdata = '{cmd: cmd, tag: tag, offset: offset,
                        length: (cmd == CMD_WRITE_MEM) ? done_cnt : length,
                        reply_to: src};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= R_IDLE;
      idx      <= '0;
      src      <= '0;
      type_hi  <= '0;
      cmd      <= '0;
      tag      <= '0;
      offset   <= '0;
      length   <= '0;
      csum     <= '0;
      done_cnt <= '0;
      seen_eop <= 1'b0;
      stat_req <= 1'b0;
      stat_bad <= 1'b0;
    end else begin
      stat_req <= 1'b0;
      stat_bad <= 1'b0;
      if (fire && in_beat.eop) seen_eop <= 1'b1;
      unique case (state)
        R_IDLE: if (in_valid && in_beat.sop) begin
          state    <= R_READ_HDR;
          idx      <= '0;
          seen_eop <= 1'b0;
        end
        R_READ_HDR: if (fire) begin
          if (idx >= 4'd6 && idx <= 4'd11) src <= {src[39:0], in_beat.data};
          if (idx == 4'd12) type_hi <= in_beat.data;
          idx <= idx + 1'b1;
          if (idx == 4'd13) begin
            idx <= '0;
            if ({type_hi, in_beat.data} == etype && !in_beat.eop) state <= R_READ_CMD;
            else state <= R_EMPTY_PKT;
          end else if (in_beat.eop) begin
            state <= R_EMPTY_PKT;
          end
        end
        R_READ_CMD: if (fire) begin
          unique case (idx)
            4'd0: cmd          <= in_beat.data;
            4'd1: tag          <= in_beat.data;
            4'd2: offset[15:8] <= in_beat.data;
            4'd3: offset[7:0]  <= in_beat.data;
            4'd4: length[15:8] <= in_beat.data;
            4'd5: length[7:0]  <= in_beat.data;
            4'd6: csum[15:8]   <= in_beat.data;
            default: csum[7:0] <= in_beat.data;
          endcase
          idx <= idx + 1'b1;
          if (idx == 4'd7) state <= R_CHECK_CMD;          // all bytes received
          else if (in_beat.eop) begin
            state    <= R_EMPTY_PKT;                      // too short
            stat_bad <= 1'b1;
          end
        end
        R_CHECK_CMD: begin
          if (cmd_good) state <= R_DO_CMD;
          else begin
            state    <= R_EMPTY_PKT;
            stat_bad <= 1'b1;
          end
        end
        R_DO_CMD: begin
          done_cnt <= '0;
          if (cmd == CMD_WRITE_MEM && !seen_eop && length != 0) state <= R_WRITE_MEM;
          else state <= R_FILL_FIFO;
        end
        R_WRITE_MEM: if (fire) begin
          if (done_cnt != length) done_cnt <= done_cnt + 1'b1;
          if (in_beat.eop || done_cnt + 16'd1 >= length) state <= R_FILL_FIFO;
        end
        R_FILL_FIFO: if (!fifo_full) begin
          state    <= R_EMPTY_PKT;
          stat_req <= 1'b1;
        end
        R_EMPTY_PKT: begin
          if (seen_eop || (fire && in_beat.eop)) state <= R_IDLE;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
