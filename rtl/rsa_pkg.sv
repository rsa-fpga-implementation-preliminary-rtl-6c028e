// rsa_pkg: types and constants shared by the RSA link.
//
// A packet is a 32-bit header followed by an M-bit body. The header layout
// (bit 0 = LSB) follows the link protocol: bit 0 data flag, bit 1 start flag,
// bit 2 raw flag, bits 3-6 reserved, bits 7-14 transmission ID, bits 15-22
// packet number, bits 23-31 body length in bytes minus one. A packet whose
// data flag is 0 is a signal: it has no body and its transmission ID names
// the signal. The numeric IDs of the two signals (stall, unstall) and the
// meaning "bypass the RSA engine" given to the raw flag are this design's
// own choices. The public exponent 2^16+1 is fixed by the protocol.
package rsa_pkg;

  localparam int unsigned HDR_W = 32;

  typedef struct packed {
    logic [8:0] len_m1;     // bits 31:23  body length in bytes - 1
    logic [7:0] pkt_num;    // bits 22:15  packet number
    logic [7:0] tid;        // bits 14:7   transmission ID (signal kind when data=0)
    logic [3:0] reserved;   // bits 6:3
    logic       raw;        // bit 2       raw flag: body bypasses the RSA engine
    logic       start;      // bit 1       START packet of a transmission
    logic       data;       // bit 0       1 = data packet, 0 = signal
  } header_t;

  localparam logic [7:0] SIG_STALL   = 8'h01;
  localparam logic [7:0] SIG_UNSTALL = 8'h02;

  localparam int unsigned PUBLIC_EXP = 32'h0001_0001;  // 2^16 + 1

  // Output selection switches of a board.
  typedef enum logic [1:0] {
    OUT_DECRYPTED = 2'd0,
    OUT_ENCRYPTED = 2'd1,
    OUT_BOTH      = 2'd2
  } out_mode_e;

  function automatic header_t signal_header(input logic [7:0] kind);
    header_t h;
    h = '0;
    h.data = 1'b0;
    h.tid  = kind;
    return h;
  endfunction

endpackage
