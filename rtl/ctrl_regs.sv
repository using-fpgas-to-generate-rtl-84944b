// ctrl_regs: control and status registers of the packet engine.
//
// The embedded 8-bit CPU configures the packet filter, the transmit mix and
// the packet state machines through these registers, and reads back status
// and statistics. The bus is a simple synchronous byte bus: a write takes
// effect on the clock edge where reg_we is high; reg_rdata shows the byte at
// reg_addr combinationally. Multi-byte fields are big-endian, the lowest
// address holding the most significant byte, as on the 68HC11.
//
// Map (byte addresses):
//   0x00     CTRL     [0] mode (0 generator, 1 request-response)
//                     [1] write 1: start generator (pulse)  [2] write 1: stop
//                     [3] generator data: 0 static, 1 LFSR
//   0x01     STATUS   [0] generator busy (read only)
//   0x02-03  GEN_LEN    payload bytes per generated frame (reset 1500)
//   0x04-07  GEN_COUNT  frames to generate (reset 1)
//   0x08-0B  GEN_DELAY  frame spacing in 8 ns cycles (reset 1500 = 12 us)
//   0x0C-0F  GEN_SEED   LFSR seed (reset 0xACE1ACE1)
//   0x10     GEN_NDEST  destinations used, 1..16 (reset 1)
//   0x11     GEN_STATIC static data byte (reset 0x55)
//   0x12-13  TX_RATIO   state machine : CPU mix = (TX_RATIO+1) : 1
//   0x14-15  SM_ETYPE   Ethernet type for the state machines (reset 0x88B5)
//   0x16-17  CPU_ETYPE  Ethernet type for the CPU (reset 0x88B6)
//   0x18     RX_FILTER  [0] SM channel on [1] CPU channel on [2] CPU takes the rest
//   0x1A-1B  RR_MAX_DATA data bytes per reply frame (reset 1492)
//   0x20-25  OWN_MAC    (reset 02:00:00:00:00:01)
//   0x26-29  GEN_SENT   frames generated so far (read only)
//   0x30-3D  16-bit event counters (read only): RX good, RX bad CRC,
//            RX overflow, RX unrouted, bad requests, SM frames sent,
//            CPU frames sent
//   0x40-9F  DEST[0..15], 6 bytes each
// The document lists the generator's registers (length, count, delay,
// destinations, data mode and seed) and says the filter and mix are set by the
// CPU; the addresses, widths beyond those stated and reset values are this
// design's own choices.
module ctrl_regs
  import daq_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // CPU bus
  input  logic [7:0]  reg_addr,
  input  logic [7:0]  reg_wdata,
  input  logic        reg_we,
  output logic [7:0]  reg_rdata,
  // configuration
  output cfg_t        cfg,
  output logic        gen_start,
  output logic        gen_stop,
  // status
  input  logic        gen_busy,
  input  logic [31:0] gen_sent,
  input  logic [6:0]  events      // one pulse input per event counter
);
  localparam int NREG = 160;   // 0x00..0x9F hold writable bytes

  logic [7:0]  r [NREG];
  logic [15:0] evc [7];

  function automatic logic [7:0] reset_value(input int a);
    case (8'(a))
      8'h02: return 8'h05;  8'h03: return 8'hDC;            // 1500
      8'h07: return 8'h01;                                  // count 1
      8'h0A: return 8'h05;  8'h0B: return 8'hDC;            // 1500 cycles
      8'h0C, 8'h0E: return 8'hAC; 8'h0D, 8'h0F: return 8'hE1;
      8'h10: return 8'h01;
      8'h11: return 8'h55;
      8'h14: return 8'h88;  8'h15: return 8'hB5;
      8'h16: return 8'h88;  8'h17: return 8'hB6;
      8'h18: return 8'h03;
      8'h1A: return 8'h05;  8'h1B: return 8'hD4;            // 1492
      8'h20: return 8'h02;  8'h25: return 8'h01;
      default: return 8'h00;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < NREG; a++) r[a] <= reset_value(a);
      gen_start <= 1'b0;
      gen_stop  <= 1'b0;
    end else begin
      gen_start <= reg_we && reg_addr == 8'h00 && reg_wdata[1];
      gen_stop  <= reg_we && reg_addr == 8'h00 && reg_wdata[2];
      if (reg_we && reg_addr < 8'(NREG)) r[reg_addr] <= (reg_addr == 8'h00) ? (reg_wdata & 8'h09) : reg_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 7; i++) evc[i] <= '0;
    end else begin
      for (int i = 0; i < 7; i++) if (events[i]) evc[i] <= evc[i] + 1'b1;
    end
  end

  function automatic logic [15:0] r16(input int a);
    return {r[a], r[a+1]};
  endfunction
  function automatic logic [31:0] r32(input int a);
    return {r[a], r[a+1], r[a+2], r[a+3]};
  endfunction
  function automatic logic [47:0] r48(input int a);
    return {r[a], r[a+1], r[a+2], r[a+3], r[a+4], r[a+5]};
  endfunction

  always_comb begin
    cfg.sm_mode      = r[0][0];
    cfg.gen_random   = r[0][3];
    cfg.gen_len      = r16('h02);
    cfg.gen_count    = r32('h04);
    cfg.gen_delay    = r32('h08);
    cfg.gen_seed     = r32('h0C);
    cfg.gen_ndest    = (r[8'h10][4:0] == 5'd0) ? 5'd1 :
                       (r[8'h10] > 8'd16) ? 5'd16 : r[8'h10][4:0];
    cfg.gen_static   = r[8'h11];
    cfg.tx_ratio     = r16('h12);
    cfg.sm_etype     = r16('h14);
    cfg.cpu_etype    = r16('h16);
    cfg.sm_chan_en   = r[8'h18][0];
    cfg.cpu_chan_en  = r[8'h18][1];
    cfg.cpu_take_all = r[8'h18][2];
    cfg.rr_max_data  = r16('h1A);
    cfg.own_mac      = r48('h20);
    for (int d = 0; d < 16; d++) cfg.dest[d] = r48('h40 + 6*d);
  end

  always_comb begin
    reg_rdata = 8'h00;
    if (reg_addr == 8'h00)                         reg_rdata = r[0] & 8'h09;
    else if (reg_addr == 8'h01)                    reg_rdata = {7'd0, gen_busy};
    else if (reg_addr >= 8'h26 && reg_addr <= 8'h29)
      reg_rdata = gen_sent[8*(3-(reg_addr-8'h26)) +: 8];
    else if (reg_addr >= 8'h30 && reg_addr <= 8'h3D)
      reg_rdata = reg_addr[0] ? evc[3'((reg_addr-8'h30)>>1)][7:0] : evc[3'((reg_addr-8'h30)>>1)][15:8];
    else if (reg_addr < 8'(NREG))                  reg_rdata = r[reg_addr];
  end

endmodule
