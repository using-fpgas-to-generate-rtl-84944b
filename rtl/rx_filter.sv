// rx_filter: splits the received frame stream into channels by Ethernet type.
//
// Frames come complete from the receive buffer, with their Ethernet type
// known at the first byte. Each frame is routed whole to one channel:
//   channel SM  (state machines) if sm_chan_en and type == sm_etype,
//   channel CPU                  if cpu_chan_en and type == cpu_etype,
//                                or if cpu_take_all (any other type),
//   otherwise it is read out and dropped (stat_drop pulses).
// The choice is made on the first byte and held to the end of the frame, so
// a channel that stalls holds back the frames behind it. The CPU changes the
// settings at any time; they apply from the next frame. The filter adds no
// latency: both channel byte buses are wired straight to the input bytes, and
// only the valid and ready signals are steered.
//
// From the document: the split by Ethernet packet type into a CPU channel and
// a state-machine channel, configured by the CPU. The matching rules are this
// design's own choice.
module rx_filter
  import daq_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] sm_etype,
  input  logic [15:0] cpu_etype,
  input  logic        sm_chan_en,
  input  logic        cpu_chan_en,
  input  logic        cpu_take_all,
  input  pkt_beat_t   in_beat,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [15:0] in_etype,
  output pkt_beat_t   sm_beat,
  output logic        sm_valid,
  input  logic        sm_ready,
  output pkt_beat_t   cpu_beat,
  output logic        cpu_valid,
  input  logic        cpu_ready,
  output logic        stat_drop
);
  typedef enum logic [1:0] {CH_SM, CH_CPU, CH_DROP} chan_e;
  chan_e ch_q, ch_new, ch;
  logic  in_frame;

  always_comb begin
    if (sm_chan_en && in_etype == sm_etype)                      ch_new = CH_SM;
    else if ((cpu_chan_en && in_etype == cpu_etype) || cpu_take_all) ch_new = CH_CPU;
    else                                                         ch_new = CH_DROP;
  end

  assign ch = (in_valid && in_beat.sop && !in_frame) ? ch_new : ch_q;

  assign sm_beat   = in_beat;
  assign cpu_beat  = in_beat;
  assign sm_valid  = in_valid && (ch == CH_SM);
  assign cpu_valid = in_valid && (ch == CH_CPU);
  always_comb begin
    unique case (ch)
      CH_SM:   in_ready = sm_ready;
      CH_CPU:  in_ready = cpu_ready;
      default: in_ready = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch_q      <= CH_DROP;
      in_frame  <= 1'b0;
      stat_drop <= 1'b0;
    end else begin
      stat_drop <= 1'b0;
      if (in_valid && in_beat.sop && !in_frame) ch_q <= ch_new;
      if (in_valid && in_ready) begin
        in_frame <= !in_beat.eop;
        if (in_beat.eop && ch == CH_DROP) stat_drop <= 1'b1;
      end
    end
  end

endmodule
