// daq_pkg: types, constants and helper functions shared by the Gigabit
// Ethernet DAQ firmware.
//
// All packet traffic inside the fabric is a byte stream at the 125 MHz MAC
// clock. A beat carries one byte plus start- and end-of-packet flags; it moves
// when valid and ready are both high (the usual valid/ready handshake: valid
// may not drop, and the beat may not change, until ready is seen).
// Frames are raw Ethernet frames without preamble and without CRC (the MAC
// adds and strips the CRC): 6-byte destination, 6-byte source, 2-byte type,
// then payload.
//
// The request-response application header (the byte layout is this design's
// own choice; the document only says that a request holds a command, a memory
// offset, a length and a checksum):
//   request : type | cmd(1) | tag(1) | offset(2) | length(2) | csum(2) | data
//   reply   : type | cmd|0x80(1) | tag(1) | offset(2) | length(2) | data | csum(2)
// Multi-byte fields are big-endian (network order). The request checksum
// covers cmd..length; the reply checksum covers everything after the
// Ethernet header. Both are the 16-bit one's complement of the one's
// complement sum of big-endian byte pairs (RFC 1071 style).
package daq_pkg;

  typedef logic [47:0] mac_addr_t;

  typedef struct packed {
    logic [7:0] data;
    logic       sop;
    logic       eop;
  } pkt_beat_t;

  // Request-response commands
  typedef enum logic [7:0] {
    CMD_NOP       = 8'h00,  // reply only (no data), a ping
    CMD_READ_MEM  = 8'h01,  // reply carries 'length' bytes from 'offset'
    CMD_WRITE_MEM = 8'h02   // request carries data, reply is a status only
  } rr_cmd_e;

  localparam logic [7:0] REPLY_FLAG = 8'h80;

  // Size of the Ethernet header and of the request/reply command header
  localparam int ETH_HDR_BYTES = 14;
  localparam int REQ_HDR_BYTES = 8;   // cmd, tag, offset(2), length(2), csum(2)
  localparam int RSP_HDR_BYTES = 6;   // cmd, tag, offset(2), length(2)

  // Queued request, as written to the command FIFO ("Fifo has: Address cmd")
  typedef struct packed {
    logic [7:0]  cmd;
    logic [7:0]  tag;
    logic [15:0] offset;
    logic [15:0] length;
    mac_addr_t   reply_to;   // source MAC of the request
  } rr_req_t;

  // Configuration held in the control registers (see ctrl_regs for the map)
  typedef struct packed {
    logic               sm_mode;      // 0: packet generator, 1: request-response
    logic               gen_random;   // 0: static byte, 1: LFSR data
    logic [15:0]        gen_len;      // payload bytes after the Ethernet header
    logic [31:0]        gen_count;    // frames to send
    logic [31:0]        gen_delay;    // frame start to frame start, 8 ns units
    logic [31:0]        gen_seed;     // LFSR seed
    logic [4:0]         gen_ndest;    // destinations in use, 1..16
    logic [7:0]         gen_static;   // static data byte
    logic [15:0]        tx_ratio;     // SM:CPU frame mix 1:(tx_ratio+1)
    logic [15:0]        sm_etype;     // Ethernet type routed to the state machines
    logic [15:0]        cpu_etype;    // Ethernet type routed to the CPU
    logic               sm_chan_en;
    logic               cpu_chan_en;
    logic               cpu_take_all; // CPU also gets frames matching no channel
    logic [15:0]        rr_max_data;  // data bytes per reply frame
    mac_addr_t          own_mac;
    logic [15:0][47:0]  dest;         // generator destination table
  } cfg_t;

  // One's complement 16-bit addition with end-around carry
  function automatic logic [15:0] oc_add(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + {15'd0, s[16]};
  endfunction

endpackage
