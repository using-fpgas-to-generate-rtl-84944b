// sm_wrapper: the "packet generator and state machines" block.
//
// Holds the testing engines behind one receive and one transmit stream: the
// packet generator and the request-response engine. The mode bit in the
// control registers selects which one owns the streams. A change of mode
// takes effect only between frames: the wrapper waits until neither stream
// is in the middle of a frame, so no frame is cut. In generator mode the
// frames of the state-machine channel are accepted and discarded (the
// packet analyser that would take them is not part of this design); in
// request-response mode the generator's output is held off.
// mode_now shows the mode in force; mode_switch pulses when it changes.
//
// From the document: the wrapper, its two engines and its role as a place to
// add further engines. The switch-over rule is this design's own.
module sm_wrapper
  import daq_pkg::*;
#(
  parameter int MEM_ADDR_W = 16,
  parameter int FIFO_DEPTH = 16,
  parameter int unsigned GEN_MAX_PAYLOAD   = 65535,  // caps on the generator's length
  parameter int unsigned RR_MAX_DATA_LIMIT = 65535   // and on the reply data per frame
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cfg_t        cfg,
  input  logic        gen_start,
  input  logic        gen_stop,
  // from the packet filter
  input  pkt_beat_t   rx_beat,
  input  logic        rx_valid,
  output logic        rx_ready,
  // to the transmit buffer
  output pkt_beat_t   tx_beat,
  output logic        tx_valid,
  input  logic        tx_ready,
  // status
  output logic        gen_busy,
  output logic [31:0] gen_sent,
  output logic        mode_now,
  output logic        mode_switch,
  output logic        stat_req,
  output logic        stat_bad
);
  pkt_beat_t g_beat, r_beat;
  logic      g_valid, g_ready, r_valid, r_ready;
  logic      e_ready, rr_busy, rr_frame;
  logic      rx_mid, tx_mid;

  pkt_gen #(.MAX_PAYLOAD(GEN_MAX_PAYLOAD)) u_gen (
    .clk, .rst_n, .cfg, .start(gen_start), .stop(gen_stop),
    .out_beat(g_beat), .out_valid(g_valid), .out_ready(g_ready),
    .busy(gen_busy), .sent(gen_sent)
  );

  rr_engine #(.MEM_ADDR_W(MEM_ADDR_W), .FIFO_DEPTH(FIFO_DEPTH),
              .RR_MAX_DATA_LIMIT(RR_MAX_DATA_LIMIT)) u_rr (
    .clk, .rst_n,
    .own_mac(cfg.own_mac), .etype(cfg.sm_etype), .max_data(cfg.rr_max_data),
    .in_beat(rx_beat), .in_valid(rx_valid && mode_now), .in_ready(e_ready),
    .out_beat(r_beat), .out_valid(r_valid), .out_ready(r_ready),
    .busy(rr_busy), .stat_req, .stat_bad, .stat_frame(rr_frame)
  );

  assign rx_ready = mode_now ? e_ready : 1'b1;
  assign tx_beat  = mode_now ? r_beat  : g_beat;
  assign tx_valid = mode_now ? r_valid : g_valid;
  assign g_ready  = !mode_now && tx_ready;
  assign r_ready  =  mode_now && tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_now    <= 1'b0;
      mode_switch <= 1'b0;
      rx_mid      <= 1'b0;
      tx_mid      <= 1'b0;
    end else begin
      mode_switch <= 1'b0;
      if (rx_valid && rx_ready) rx_mid <= !rx_beat.eop;
      if (tx_valid && tx_ready) tx_mid <= !tx_beat.eop;
      if (cfg.sm_mode != mode_now && !rx_mid && !tx_mid &&
          !(rx_valid && rx_ready) && !(tx_valid && tx_ready)) begin
        mode_now    <= cfg.sm_mode;
        mode_switch <= 1'b1;
      end
    end
  end

endmodule
