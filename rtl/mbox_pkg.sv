// Shared types and constants of the dual-partition middlebox.
//
// Packets move between blocks as streams of 64-bit beats with a valid/ready
// handshake: a beat transfers on a clock edge where both are high, and a
// packet is the run of beats up to and including the one with `last` set.
// Byte 0 of a beat is data[7:0]. Each beat carries its receive port (one-hot
// `src`) and, after the output-port lookup, its set of transmit ports (`dst`).
// The 64-bit bus and the four ports follow the board the design targets; the
// beat layout, the management EtherType and the management header fields are
// this design's own choices.
package mbox_pkg;

  localparam int unsigned NUM_PORTS = 4;   // front-panel ports
  localparam int unsigned DATA_W    = 64;  // packet data bus
  localparam int unsigned KEEP_W    = DATA_W / 8;
  localparam int unsigned NUM_RP    = 2;   // reconfigurable partitions RP_0, RP_1
  localparam int unsigned CFG_W     = 32;  // ICAP / bitstream word

  typedef logic [NUM_PORTS-1:0] port_mask_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [KEEP_W-1:0] keep;
    logic              last;
    port_mask_t        src;
    port_mask_t        dst;
  } beat_t;

  // Management packets are Ethernet frames with this EtherType (bytes 12-13).
  localparam logic [15:0] MGMT_ETHERTYPE = 16'h88B5;

  // Management header, bytes 14 and 15 of the frame (beat 1, data[55:48] and
  // data[63:56]): a flag byte and the target partition index.
  localparam int unsigned FLAG_START = 0;  // first segment of a bitstream
  localparam int unsigned FLAG_LAST  = 1;  // bitstream complete: reconfigure
  localparam int unsigned FLAG_REPLY = 7;  // status packet sent by the device

  // One bitstream word handed from the management handler to the
  // reconfiguration handler.
  typedef struct packed {
    logic [CFG_W-1:0] word;
    logic             first;  // first word of a bitstream: restart storage
    logic             last;   // final word: start the reconfiguration
    logic             rp;     // target partition
  } cfg_word_t;

  // 32-bit word from bytes b0..b3 of the stream, b0 most significant, so a
  // bitstream file sent in byte order lands in SRAM as its big-endian words.
  function automatic logic [CFG_W-1:0] bytes_to_word(input logic [31:0] lane);
    return {lane[7:0], lane[15:8], lane[23:16], lane[31:24]};
  endfunction

  // EtherType from bits [47:32] of a frame's second beat (bytes 12 and 13)
  function automatic logic [15:0] ethertype_of(input logic [15:0] beat1_47_32);
    return {beat1_47_32[7:0], beat1_47_32[15:8]};
  endfunction

endpackage
