// host_cmd_pkg: byte codes of the host link protocol, shared by host_ctrl
// and anything that talks to it.
//
// Commands (first byte of a message from the host):
//   CMD_MODE  'M', then one mode byte -> reply ACK (or NAK for a bad mode)
//   CMD_KEY   'K'                     -> regenerates the PUF key, reply ACK
//                                        once the new key is in use
//   CMD_BLOCK 'B', then 16 data bytes -> reply: the 16 result bytes
// Data bytes are sent most significant first (first byte = bits 127:120).
// Modes: MODE_ENC encrypts, MODE_DEC decrypts, MODE_LOOP encrypts and feeds
// the ciphertext straight to the decryption engine (the demonstration path
// with both engines in series).
package host_cmd_pkg;

  localparam logic [7:0] CMD_MODE  = 8'h4d;  // 'M'
  localparam logic [7:0] CMD_KEY   = 8'h4b;  // 'K'
  localparam logic [7:0] CMD_BLOCK = 8'h42;  // 'B'
  localparam logic [7:0] ACK       = 8'h41;  // 'A'
  localparam logic [7:0] NAK       = 8'h4e;  // 'N'

  typedef enum logic [1:0] {
    MODE_ENC  = 2'd0,
    MODE_DEC  = 2'd1,
    MODE_LOOP = 2'd2
  } mode_t;

endpackage
