// pkt_gen: packet generator state machine.
//
// Turns the FPGA into a programmable traffic source for network tests. After
// a start pulse it sends gen_count raw Ethernet frames of gen_len payload
// bytes, one every gen_delay clock cycles (8 ns granularity at 125 MHz,
// measured from frame start to frame start; a frame that takes longer than
// the spacing is followed at once by the next). Destinations come from a
// table of up to 16 MAC addresses and are used in turn, one per frame. Each
// payload begins with the frame's sequence number (32 bits) and the payload
// length (16 bits), so a receiver can count lost frames; the rest of the
// payload is either a static byte or the low byte of an LFSR that is seeded
// at the start of every run and shifted once per data byte.
//
// Frame: dest MAC (6) | own MAC (6) | type (2) | seq (4) | len (2) | data.
// The output is a valid/ready byte stream; one byte moves per cycle while
// out_ready is high. Settings are latched at start; a length above
// MAX_PAYLOAD is cut to MAX_PAYLOAD, so that a frame always fits the
// store-and-forward buffer behind the generator. stop ends the run after
// the current frame. busy is high from start until the last frame ends.
//
// From the document: the registers (length, count, delay, destinations, data
// mode, seed), 16 destinations cycled frame by frame, up to 2^32 frames,
// 8 ns delay granularity, 16-bit packet length. The header layout, the
// spacing rule and the LFSR are this design's own choices.
module pkt_gen
  import daq_pkg::*;
#(
  parameter int unsigned MAX_PAYLOAD = 65535  // longest payload the sink can take
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cfg_t        cfg,
  input  logic        start,
  input  logic        stop,
  output pkt_beat_t   out_beat,
  output logic        out_valid,
  input  logic        out_ready,
  output logic        busy,
  output logic [31:0] sent
);
  typedef enum logic [1:0] {G_IDLE, G_WAIT, G_SEND} gstate_e;
  gstate_e     state;

  logic [15:0] len_q;
  logic [31:0] count_q, delay_q, timer;
  logic [4:0]  ndest_q;
  logic        random_q, stop_q;
  logic [7:0]  static_q;
  logic [3:0]  dest_idx;
  logic [16:0] pos;             // byte position in the frame
  logic [16:0] last_pos;
  mac_addr_t   dst;
  logic [31:0] lfsr_state;
  logic        fire, is_data;

  assign last_pos = 17'(len_q) + 17'd13;
  assign dst      = cfg.dest[dest_idx];
  assign fire     = out_valid && out_ready;
  assign is_data  = (pos >= 17'd20);

  lfsr32 u_lfsr (
    .clk, .rst_n,
    .load(start), .seed(cfg.gen_seed),
    .step(fire && is_data && random_q),
    .state(lfsr_state)
  );

  always_comb begin
    logic [7:0] b;
    unique case (pos)
      17'd0:  b = dst[47:40];
      17'd1:  b = dst[39:32];
      17'd2:  b = dst[31:24];
      17'd3:  b = dst[23:16];
      17'd4:  b = dst[15:8];
      17'd5:  b = dst[7:0];
      17'd6:  b = cfg.own_mac[47:40];
      17'd7:  b = cfg.own_mac[39:32];
      17'd8:  b = cfg.own_mac[31:24];
      17'd9:  b = cfg.own_mac[23:16];
      17'd10: b = cfg.own_mac[15:8];
      17'd11: b = cfg.own_mac[7:0];
      17'd12: b = cfg.sm_etype[15:8];
      17'd13: b = cfg.sm_etype[7:0];
      17'd14: b = sent[31:24];
      17'd15: b = sent[23:16];
      17'd16: b = sent[15:8];
      17'd17: b = sent[7:0];
      17'd18: b = len_q[15:8];
      17'd19: b = len_q[7:0];
      default: b = random_q ? lfsr_state[7:0] : static_q;
    endcase
    out_beat = '{data: b, sop: (pos == 17'd0), eop: (pos == last_pos)};
  end

  assign out_valid = (state == G_SEND);
  assign busy      = (state != G_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= G_IDLE;
      len_q    <= '0;
      count_q  <= '0;
      delay_q  <= '0;
      timer    <= '0;
      ndest_q  <= 5'd1;
      random_q <= 1'b0;
      static_q <= '0;
      stop_q   <= 1'b0;
      dest_idx <= '0;
      pos      <= '0;
      sent     <= '0;
    end else begin
      if (timer != 0) timer <= timer - 1'b1;
      if (stop && state != G_IDLE) stop_q <= 1'b1;
      unique case (state)
        G_IDLE: if (start) begin
          len_q    <= (32'(cfg.gen_len) > MAX_PAYLOAD) ? 16'(MAX_PAYLOAD) : cfg.gen_len;
          count_q  <= cfg.gen_count;
          delay_q  <= cfg.gen_delay;
          ndest_q  <= cfg.gen_ndest;
          random_q <= cfg.gen_random;
          static_q <= cfg.gen_static;
          stop_q   <= 1'b0;
          dest_idx <= '0;
          sent     <= '0;
          timer    <= '0;
          if (cfg.gen_count != 0) state <= G_WAIT;
        end
        G_WAIT: begin
          if (stop_q || stop || sent == count_q) begin
            state <= G_IDLE;
          end else if (timer <= 32'd1) begin
            state <= G_SEND;
            pos   <= '0;
            // the frame starts next cycle: spacing counts from then
            timer <= delay_q;
          end
        end
        G_SEND: if (fire) begin
          if (pos == last_pos) begin
            sent     <= sent + 1'b1;
            dest_idx <= (5'(dest_idx) + 5'd1 >= ndest_q) ? 4'd0 : dest_idx + 1'b1;
            state    <= G_WAIT;
          end else begin
            pos <= pos + 1'b1;
          end
        end
        default: state <= G_IDLE;
      endcase
    end
  end

endmodule
