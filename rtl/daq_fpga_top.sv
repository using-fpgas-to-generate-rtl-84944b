// daq_fpga_top: Gigabit Ethernet DAQ test firmware, fabric part.
//
// Everything between the FPGA's hard Ethernet MAC and the soft control CPU:
//   MAC rx -> rx_buffer -> rx_filter -+-> SM channel  -> sm_wrapper
//                                      +-> CPU channel -> cpu_rx_* ports
//   sm_wrapper -> tx_buffer (SM)  --+
//   cpu_tx_*   -> tx_buffer (CPU) --+-> tx_mux -> MAC tx
//   CPU bus <-> ctrl_regs (filter, mix ratio, generator, request-response)
// sm_wrapper holds the packet generator and the request-response engine.
// The MAC, the transceiver, the CPU and the clock synthesis are outside: their
// signals are ports. All ports except clk_50/clk_cpu are synchronous to the
// 125 MHz clk; a CPU running on clk_cpu needs its bus and streams brought
// into the clk domain (not part of this design). The MAC's own configuration
// interface is driven by the CPU directly and is not routed through here.
// The transmit buffers' pkt_avail flags and the receive buffer's frame length
// are left unused: the mixer works from the buffers' valid signals and the
// filter needs only the Ethernet type.
module daq_fpga_top
  import daq_pkg::*;
#(
  parameter int RX_BUF_ADDR_W = 12,
  parameter int TX_BUF_ADDR_W = 12,
  parameter int MEM_ADDR_W    = 16,
  parameter int FIFO_DEPTH    = 16
) (
  input  logic        clk,          // 125 MHz
  input  logic        rst_n,
  input  logic        clk_50,
  output logic        clk_cpu,      // 12.5 MHz for the CPU
  // MAC client receive
  input  logic        mac_rx_sop,
  input  logic        mac_rx_dv,
  input  logic [7:0]  mac_rx_data,
  input  logic        mac_rx_good,
  input  logic        mac_rx_bad,
  // MAC client transmit
  output logic [7:0]  mac_tx_data,
  output logic        mac_tx_dv,
  output logic        mac_tx_sop,
  output logic        mac_tx_eop,
  input  logic        mac_tx_ack,
  // CPU register bus
  input  logic [7:0]  reg_addr,
  input  logic [7:0]  reg_wdata,
  input  logic        reg_we,
  output logic [7:0]  reg_rdata,
  // CPU packet channels
  output pkt_beat_t   cpu_rx_beat,
  output logic        cpu_rx_valid,
  input  logic        cpu_rx_ready,
  input  pkt_beat_t   cpu_tx_beat,
  input  logic        cpu_tx_valid,
  output logic        cpu_tx_ready,
  // status
  output logic        sm_mode_now,
  output logic        stat_mode_switch,
  output logic        stat_rr_req,
  output logic        stat_tx_underrun
);
  // A transmit buffer only releases a frame that fits in it whole, so the
  // generator's payload and the reply data per frame are capped to fit the
  // state-machine transmit buffer (generated frame = 14 + payload bytes,
  // reply frame = 14 + 6 + data + 2 bytes).
  localparam int unsigned TX_BUF_BYTES   = 2 ** TX_BUF_ADDR_W;
  localparam int unsigned GEN_MAX_PAYLOAD =
    (TX_BUF_BYTES - 14 > 65535) ? 65535 : TX_BUF_BYTES - 14;
  localparam int unsigned RR_MAX_DATA_LIMIT =
    (TX_BUF_BYTES - 22 > 65535) ? 65535 : TX_BUF_BYTES - 22;

  cfg_t        cfg;
  logic        gen_start, gen_stop, gen_busy;
  logic [31:0] gen_sent;
  logic [6:0]  events;

  pkt_beat_t   rb_beat, sm_rx_beat, sm_tx_beat, smb_beat, cpub_beat;
  logic        rb_valid, rb_ready, sm_rx_valid, sm_rx_ready;
  logic        sm_tx_valid, sm_tx_ready, smb_valid, smb_ready, cpub_valid, cpub_ready;
  logic        smb_avail, cpub_avail;
  logic [15:0] rb_etype, rb_len;
  logic        st_good, st_bad, st_ovf, st_drop, st_rbad;
  logic        st_smf, st_cpuf;

  cpu_clk_div u_clkdiv (.clk_50, .rst_n, .clk_cpu);

  ctrl_regs u_regs (
    .clk, .rst_n, .reg_addr, .reg_wdata, .reg_we, .reg_rdata,
    .cfg, .gen_start, .gen_stop, .gen_busy, .gen_sent, .events
  );
  assign events = {st_cpuf, st_smf, st_rbad, st_drop, st_ovf, st_bad, st_good};

  rx_buffer #(.ADDR_W(RX_BUF_ADDR_W)) u_rxbuf (
    .clk, .rst_n,
    .mac_rx_sop, .mac_rx_dv, .mac_rx_data, .mac_rx_good, .mac_rx_bad,
    .out_beat(rb_beat), .out_valid(rb_valid), .out_ready(rb_ready),
    .out_etype(rb_etype), .out_len(rb_len),
    .stat_good(st_good), .stat_bad(st_bad), .stat_overflow(st_ovf)
  );

  rx_filter u_filter (
    .clk, .rst_n,
    .sm_etype(cfg.sm_etype), .cpu_etype(cfg.cpu_etype),
    .sm_chan_en(cfg.sm_chan_en), .cpu_chan_en(cfg.cpu_chan_en), .cpu_take_all(cfg.cpu_take_all),
    .in_beat(rb_beat), .in_valid(rb_valid), .in_ready(rb_ready), .in_etype(rb_etype),
    .sm_beat(sm_rx_beat), .sm_valid(sm_rx_valid), .sm_ready(sm_rx_ready),
    .cpu_beat(cpu_rx_beat), .cpu_valid(cpu_rx_valid), .cpu_ready(cpu_rx_ready),
    .stat_drop(st_drop)
  );

  sm_wrapper #(.MEM_ADDR_W(MEM_ADDR_W), .FIFO_DEPTH(FIFO_DEPTH),
               .GEN_MAX_PAYLOAD(GEN_MAX_PAYLOAD),
               .RR_MAX_DATA_LIMIT(RR_MAX_DATA_LIMIT)) u_sm (
    .clk, .rst_n, .cfg, .gen_start, .gen_stop,
    .rx_beat(sm_rx_beat), .rx_valid(sm_rx_valid), .rx_ready(sm_rx_ready),
    .tx_beat(sm_tx_beat), .tx_valid(sm_tx_valid), .tx_ready(sm_tx_ready),
    .gen_busy, .gen_sent, .mode_now(sm_mode_now), .mode_switch(stat_mode_switch),
    .stat_req(stat_rr_req), .stat_bad(st_rbad)
  );

  tx_buffer #(.ADDR_W(TX_BUF_ADDR_W)) u_smbuf (
    .clk, .rst_n,
    .in_beat(sm_tx_beat), .in_valid(sm_tx_valid), .in_ready(sm_tx_ready),
    .out_beat(smb_beat), .out_valid(smb_valid), .out_ready(smb_ready),
    .pkt_avail(smb_avail)
  );

  tx_buffer #(.ADDR_W(TX_BUF_ADDR_W)) u_cpubuf (
    .clk, .rst_n,
    .in_beat(cpu_tx_beat), .in_valid(cpu_tx_valid), .in_ready(cpu_tx_ready),
    .out_beat(cpub_beat), .out_valid(cpub_valid), .out_ready(cpub_ready),
    .pkt_avail(cpub_avail)
  );

  tx_mux u_txmux (
    .clk, .rst_n, .ratio(cfg.tx_ratio),
    .sm_beat(smb_beat), .sm_valid(smb_valid), .sm_ready(smb_ready),
    .cpu_beat(cpub_beat), .cpu_valid(cpub_valid), .cpu_ready(cpub_ready),
    .mac_tx_data, .mac_tx_dv, .mac_tx_sop, .mac_tx_eop, .mac_tx_ack,
    .stat_sm_frame(st_smf), .stat_cpu_frame(st_cpuf), .stat_underrun(stat_tx_underrun)
  );

endmodule
