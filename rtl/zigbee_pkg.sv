// zigbee_pkg: constants and types shared by the IEEE 802.15.4 (2.4 GHz)
// transmitter blocks.
//
// The frame layout (4 preamble octets, start-of-frame delimiter, one frame
// length octet, then the PSDU that ends in a 2-octet FCS), the CRC-16
// generator x^16+x^15+x^2+1, the 4-bit data symbol and the 2 Mchip/s,
// 250 kbit/s rates are the design's specification. The numeric values of
// the preamble octets, the SFD and the 32-chip spreading sequences are those
// of IEEE 802.15.4 for the 2.4 GHz O-QPSK PHY, which the design follows.
package zigbee_pkg;

  // ---- PHY frame (PPDU) ---------------------------------------------------
  localparam int unsigned PREAMBLE_OCTETS = 4;      // SHR preamble length
  localparam logic [7:0]  PREAMBLE_OCTET  = 8'h00;  // IEEE 802.15.4 preamble
  localparam logic [7:0]  SFD_OCTET       = 8'hA7;  // IEEE 802.15.4 SFD
  localparam int unsigned FCS_OCTETS      = 2;      // CRC-16 frame check
  localparam int unsigned MAX_PSDU_OCTETS = 127;    // 7-bit frame length

  // ---- CRC-16 ---------------------------------------------------------------
  // x^16 + x^15 + x^2 + 1, written without the x^16 term.
  localparam logic [15:0] CRC16_POLY = 16'h8005;

  // ---- Spreading ------------------------------------------------------------
  localparam int unsigned SYMBOL_BITS      = 4;
  localparam int unsigned CHIPS_PER_SYMBOL = 32;
  // Chip sequence of data symbol 0, chip c0 in bit 31 (c0 is sent first).
  localparam logic [31:0] SYMBOL0_CHIPS = 32'b1101_1001_1100_0011_0101_0010_0010_1110;

  // Chip k of data symbol s. Symbols 1..7 are symbol 0 delayed cyclically by
  // 4*s chips; symbols 8..15 are symbols 0..7 with every odd chip inverted.
  function automatic logic chip_of(input logic [3:0] s, input logic [4:0] k);
    logic [4:0] src;
    src = k - {s[2:0], 2'b00};
    return SYMBOL0_CHIPS[5'd31 - src] ^ (s[3] & k[0]);
  endfunction

  // ---- MAC header fields of one frame (Figure of the MAC algorithm) ---------
  // The *_en flags say whether the optional field is sent. An acknowledgement
  // frame sends only frame control and sequence number.
  typedef struct packed {
    logic [15:0] frame_ctrl;
    logic [7:0]  seq_num;
    logic        dst_en;
    logic [15:0] dst_addr;   // 16-bit short address
    logic        src_en;
    logic [15:0] src_addr;   // 16-bit short address
    logic        sec_en;     // sends security control and key identifier
    logic [7:0]  sec_ctrl;
    logic [7:0]  key_id;
    logic [6:0]  payload_len;
  } mac_hdr_t;

endpackage
