// slink_pkg: types and constants shared by the SLink controller.
//
// SLink moves packets between two chips over one, two or four 8b10b lanes.
// A packet is a 64-bit header control word, optional 64-bit data words and,
// when CRC is enabled, one trailing CRC word. This package holds the header
// layout, the K-code values that frame packets on the lanes, the register
// map of the function registers and the CRC-16 word update.
//
// From the protocol definition: the K-code set (IDL/COM/PAD/STP/END), the
// header field positions, the xmode encoding (0 = x1, 1 = x2, 2 = x4) and
// the request type encoding (0 = write, 1 = read). This design's own choices:
// the packet type codes, the ACK/NAK bit of a CRC response, the CRC
// polynomial (CRC-16, x^16+x^15+x^2+1) and the register bit positions of
// SOFT_RESETN and the lane-rate bit.
package slink_pkg;

  // ---------------------------------------------------------------- K-codes
  localparam logic [7:0] K_IDL = 8'h7C;  // K28.3 idle
  localparam logic [7:0] K_COM = 8'hBC;  // K28.5 initial value / training
  localparam logic [7:0] K_PAD = 8'hF7;  // K23.7 padding
  localparam logic [7:0] K_STP = 8'hFB;  // K27.7 start of packet
  localparam logic [7:0] K_END = 8'hFD;  // K29.7 end of packet

  localparam int unsigned NUM_LANES = 4;
  localparam int unsigned DATA_W    = 64;

  // ------------------------------------------------------------ encodings
  typedef enum logic [2:0] {
    XMODE_X1 = 3'd0,
    XMODE_X2 = 3'd1,
    XMODE_X4 = 3'd2
  } xmode_e;

  typedef enum logic [1:0] {
    PT_REQ     = 2'd0,   // write or read request
    PT_CRC_RSP = 2'd1,   // CRC response (RIGHT / ERROR)
    PT_DATA    = 2'd2    // data packet answering a read request
  } pkt_type_e;

  localparam logic REQ_WRITE = 1'b0;
  localparam logic REQ_READ  = 1'b1;

  // In a CRC response the request-type bit carries the verdict.
  localparam logic RSP_RIGHT = 1'b0;
  localparam logic RSP_ERROR = 1'b1;

  // Header control word, bit 63 first.
  typedef struct packed {
    logic [31:0] remote_addr;  // 63:32
    logic [7:0]  rsvd_hi;      // 31:24
    logic [15:0] data_len;     // 23:8  number of 64-bit data words
    logic [2:0]  lanes;        // 7:5   xmode_e
    logic        crc_en;       // 4
    logic [1:0]  pkt_type;     // 3:2   pkt_type_e
    logic        rsvd_lo;      // 1
    logic        req_type;     // 0
  } slink_hdr_t;

  // One entry of the link word stream between the packet layer and the
  // lane dispatcher: either a 64-bit packet word or one cycle of a K-code
  // on every enabled lane.
  typedef struct packed {
    logic        is_k;
    logic [7:0]  kcode;
    logic [2:0]  lanes;
    logic [63:0] data;
  } link_word_t;

  // Does a packet of this header carry data words (and a CRC when enabled)?
  function automatic logic pkt_has_data(slink_hdr_t h);
    return (h.pkt_type == PT_DATA) ||
           (h.pkt_type == PT_REQ && h.req_type == REQ_WRITE);
  endfunction

  // Number of lanes used by an xmode code; unknown codes fall back to x1.
  function automatic int unsigned xmode_lanes(logic [2:0] m);
    case (m)
      XMODE_X2: return 2;
      XMODE_X4: return 4;
      default:  return 1;
    endcase
  endfunction

  // ------------------------------------------------------- register map
  localparam logic [4:0] REG_CTRL   = 5'h00;
  localparam logic [4:0] REG_HDR    = 5'h04;
  localparam logic [4:0] REG_RADDR  = 5'h08;
  localparam logic [4:0] REG_LADDR  = 5'h0C;
  localparam logic [4:0] REG_STATUS = 5'h10;

  localparam int unsigned CTRL_SOFT_RESETN = 0;
  localparam int unsigned CTRL_GTPS        = 1;
  localparam int unsigned CTRL_START       = 4;

  localparam int unsigned STAT_BUSY    = 0;
  localparam int unsigned STAT_DONE    = 1;
  localparam int unsigned STAT_LINK_UP = 2;

  // ------------------------------------------------------------- CRC-16
  localparam logic [15:0] CRC_POLY = 16'h8005;
  localparam logic [15:0] CRC_INIT = 16'h0000;

  // Update a CRC with one 64-bit word, most significant bit first.
  function automatic logic [15:0] crc16_word(logic [15:0] crc, logic [63:0] d);
    logic [15:0] c;
    c = crc;
    for (int i = 63; i >= 0; i--) begin
      if (c[15] ^ d[i]) c = {c[14:0], 1'b0} ^ CRC_POLY;
      else              c = {c[14:0], 1'b0};
    end
    return c;
  endfunction

endpackage
