`timescale 1ns / 1ps
// serdes_pkg: characters, commands and state encodings shared by the
// chip-to-chip SerDes link.
//
// The link carries 8b/10b characters. Three control characters frame the
// traffic: K28.7 is the idle/training pattern the transmitter sends whenever
// it has nothing else to send, K27.7 opens a frame and K28.4 closes it.
// Inside a frame the bytes are Command, Length, four Address bytes (MSB
// first) and, for a write, four Data bytes (MSB first). A read response is a
// frame holding the four bytes of the read word.
// The character values, the command codes and the state numbering of the bus
// interface follow the documented design; the numbering of the other state
// machines is this design's own.
// Each module uses only some of these constants, so a lint run on one module
// lists the others as unused.
package serdes_pkg;

  // 8b/10b control characters (the byte value, sent with K = 1)
  localparam logic [7:0] K28_7_TRAIN = 8'hFC;  // idle / training pattern
  localparam logic [7:0] K27_7_START = 8'hFB;  // start of frame
  localparam logic [7:0] K28_4_STOP  = 8'h9C;  // end of frame
  localparam logic [7:0] K28_5_COMMA = 8'hBC;  // disparity fix in idle

  // 10-bit forms of K28.7 (bit 9 = a, the first bit on the wire)
  localparam logic [9:0] K28_7_NEG = 10'b0011111000;  // sent with RD-
  localparam logic [9:0] K28_7_POS = 10'b1100000111;  // sent with RD+

  // Frame commands
  localparam logic [7:0] CMD_WRITE = 8'h03;
  localparam logic [7:0] CMD_READ  = 8'h04;

  // Bytes following the command byte in each frame type
  localparam int unsigned WRITE_TAIL = 9;  // length + 4 address + 4 data
  localparam int unsigned READ_TAIL  = 5;  // length + 4 address
  localparam int unsigned RESP_TAIL  = 3;  // rest of a 4-byte read response

  // Bitslip controller states
  typedef enum logic [1:0] {
    BS_INIT    = 2'd0,
    BS_BITSLIP = 2'd1,
    BS_WAIT    = 2'd2,
    BS_IDLE    = 2'd3
  } bitslip_state_t;

endpackage
