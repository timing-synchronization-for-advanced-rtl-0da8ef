// timing_pkg: types, constants and helper functions shared by the timing-network RTL.
//
// The network runs every node from a 2^26 Hz oscillator. A fiber carries one bit per
// 8 oscillator cycles (2^23 Hz); a bit is a pulse whose rising edge is strictly periodic
// and whose width (2, 4 or 6 cycles of 8) gives the symbol -1, 0 or +1. A 128-bit packet
// fills one time slot of 1024 cycles, sent most significant bit first.
//
// Packet layout (bit 127 first on the wire):
//   [127]     flow-control tag (1 = sender is almost full, 0 = sender accepts data)
//   [126:124] address offset (depth in the tree; 000 = MFO or invalid)
//   [123:96]  28-bit address, one nibble per level
//   data packet: [95:32] payload, [31:16] packet ID, [15:0] CRC
//   1PPS packet: [95:64] GPS second, [63:32] unused, [31:28] 1PPS marker, [27:16] unused,
//                [15:0] CRC
// The layout follows the document. The CRC polynomial (CRC-16-CCITT, 0x1021, preset
// 0xFFFF, over bits 127..16) and the reserved flow-control packet ID are this design's
// own choices; the document names a 16-bit check but not its polynomial.
package timing_pkg;

  localparam int OSR        = 8;     // oscillator cycles per bit (2^26 / 2^23)
  localparam int PKT_BITS   = 128;   // bits per packet and per time slot
  localparam int SLOT_CYC   = OSR * PKT_BITS; // 1024 cycles per time slot
  localparam int NPORTS     = 16;    // fanout channels per board
  localparam int MAX_OFFSET = 7;     // deepest level (3-bit offset)

  // Packet ID reserved for the flow-control packet a fanout sends on AF/AE.
  localparam logic [15:0] FC_PKT_ID = 16'hFC00;

  // Line symbols: the three pulse widths.
  typedef enum logic [1:0] {SYM_ZERO = 2'd0, SYM_POS = 2'd1, SYM_NEG = 2'd2} sym_t;

  typedef struct packed {
    logic        fc;       // flow-control tag
    logic [2:0]  offset;   // depth
    logic [27:0] addr;     // nibble per level
  } addr_t;

  typedef struct packed {
    addr_t       a;
    logic [63:0] payload;
    logic [15:0] id;
    logic [15:0] crc;
  } data_pkt_t;

  typedef struct packed {
    addr_t       a;
    logic [31:0] gps_sec;
    logic        locked;   // return packets: sender's last 1PPS edge matched its second
    logic [30:0] unused0;
    logic [3:0]  marker;
    logic [11:0] unused1;
    logic [15:0] crc;
  } pps_pkt_t;

  // One bit of the CRC-16-CCITT shift register (serial form, used by the transmitter).
  function automatic logic [15:0] crc_step(input logic [15:0] c, input logic b);
    return {c[14:0], 1'b0} ^ ((c[15] ^ b) ? 16'h1021 : 16'h0000);
  endfunction

  // CRC-16-CCITT over packet bits 127..16, MSB first.
  function automatic logic [15:0] pkt_crc(input logic [127:0] p);
    logic [15:0] c;
    logic        fb;
    c = 16'hFFFF;
    for (int i = 127; i >= 16; i--) begin
      fb = c[15] ^ p[i];
      c  = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  // Packet with its CRC field filled in.
  function automatic logic [127:0] with_crc(input logic [127:0] p);
    return {p[127:16], pkt_crc(p)};
  endfunction

  function automatic logic crc_ok(input logic [127:0] p);
    return pkt_crc(p) == p[15:0];
  endfunction

  // Nibble position of a given offset (1..7): offset 1 -> bits 27..24 of the 28-bit address.
  function automatic logic [3:0] addr_nibble(input logic [27:0] a, input logic [2:0] off);
    logic [3:0] n;
    n = '0;
    for (int k = 1; k <= 7; k++)
      if (off == 3'(k)) n = a[27-4*(k-1) -: 4];
    return n;
  endfunction

  function automatic logic [27:0] set_nibble(input logic [27:0] a, input logic [2:0] off,
                                             input logic [3:0] v);
    logic [27:0] r;
    r = a;
    for (int k = 1; k <= 7; k++)
      if (off == 3'(k)) r[27-4*(k-1) -: 4] = v;
    return r;
  endfunction

endpackage
