// tx_mux: transmit arbiter and MAC transmit client.
//
// Two buffered frame sources share the one MAC: the packet state machines
// (priority) and the embedded CPU. Frames are never interleaved; the choice
// is made at each frame start. While both have a frame waiting, the state
// machines send ratio+1 frames for every CPU frame, so the mix runs from 1:1
// (ratio = 0) to 1:65536 = 1:2^16 (ratio = 65535). A source that is alone is
// served at once.
//
// MAC side (modelled on a hard-MAC client interface): the first byte is
// presented with mac_tx_dv and mac_tx_sop and held until the MAC answers with
// mac_tx_ack; from the next cycle on the MAC takes one byte per cycle and
// mac_tx_dv must stay high up to the byte flagged mac_tx_eop. The sources are
// store-and-forward buffers, so they can always keep up; a gap would be
// reported on stat_underrun.
//
// From the document: the two sources, the state machines' priority and the
// 1:1 to 1:2^16 range. The exact counting rule and the MAC handshake are this
// design's own.
module tx_mux
  import daq_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] ratio,
  // state-machine frames (priority)
  input  pkt_beat_t   sm_beat,
  input  logic        sm_valid,
  output logic        sm_ready,
  // CPU frames
  input  pkt_beat_t   cpu_beat,
  input  logic        cpu_valid,
  output logic        cpu_ready,
  // MAC client transmit side
  output logic [7:0]  mac_tx_data,
  output logic        mac_tx_dv,
  output logic        mac_tx_sop,
  output logic        mac_tx_eop,
  input  logic        mac_tx_ack,
  // statistics pulses
  output logic        stat_sm_frame,
  output logic        stat_cpu_frame,
  output logic        stat_underrun
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT_ACK, S_STREAM} state_e;
  state_e      state;
  logic        sel_cpu;     // source of the current frame
  logic [16:0] sm_run;      // SM frames sent while the CPU was waiting

  pkt_beat_t cur_beat;
  logic      cur_valid, take;

  assign cur_beat  = sel_cpu ? cpu_beat  : sm_beat;
  assign cur_valid = sel_cpu ? cpu_valid : sm_valid;

  assign mac_tx_data = cur_beat.data;
  assign mac_tx_sop  = (state == S_WAIT_ACK);
  assign mac_tx_eop  = (state != S_IDLE) && cur_beat.eop;
  assign mac_tx_dv   = (state != S_IDLE) && cur_valid;

  assign take      = (state == S_WAIT_ACK) ? mac_tx_ack : (state == S_STREAM);
  assign sm_ready  = take && !sel_cpu;
  assign cpu_ready = take &&  sel_cpu;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      sel_cpu        <= 1'b0;
      sm_run         <= '0;
      stat_sm_frame  <= 1'b0;
      stat_cpu_frame <= 1'b0;
      stat_underrun  <= 1'b0;
    end else begin
      stat_sm_frame  <= 1'b0;
      stat_cpu_frame <= 1'b0;
      stat_underrun  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (sm_valid && cpu_valid) begin
            if (sm_run > {1'b0, ratio}) begin
              sel_cpu <= 1'b1;
              sm_run  <= '0;
            end else begin
              sel_cpu <= 1'b0;
              sm_run  <= sm_run + 1'b1;
            end
            state <= S_WAIT_ACK;
          end else if (sm_valid) begin
            sel_cpu <= 1'b0;
            state   <= S_WAIT_ACK;
          end else if (cpu_valid) begin
            sel_cpu <= 1'b1;
            sm_run  <= '0;
            state   <= S_WAIT_ACK;
          end
        end
        S_WAIT_ACK: if (mac_tx_ack) begin
          if (cur_beat.eop) begin
            state <= S_IDLE;
            if (sel_cpu) stat_cpu_frame <= 1'b1; else stat_sm_frame <= 1'b1;
          end else begin
            state <= S_STREAM;
          end
        end
        S_STREAM: begin
          if (!cur_valid) stat_underrun <= 1'b1;
          if (cur_valid && cur_beat.eop) begin
            state <= S_IDLE;
            if (sel_cpu) stat_cpu_frame <= 1'b1; else stat_sm_frame <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_start_on_sop: assert property (@(posedge clk) disable iff (!rst_n)
                    state == S_WAIT_ACK |-> cur_valid && cur_beat.sop);
  a_no_gap:       assert property (@(posedge clk) disable iff (!rst_n)
                    state == S_STREAM |-> cur_valid);

endmodule
