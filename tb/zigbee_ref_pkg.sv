// zigbee_ref_pkg: reference models for the transmitter testbenches.
//
// They are written differently from the RTL on purpose: the CRC is a plain
// polynomial long division over a bit queue, and the spreading codes are the
// sixteen 32-chip sequences of the IEEE 802.15.4 2.4 GHz PHY written out in
// full rather than derived by rotation.
package zigbee_ref_pkg;

  typedef bit bitq_t[$];
  typedef byte unsigned byteq_t[$];

  // Remainder of msg(x) * x^16 mod (x^16 + poly), msg[0] is the highest power.
  function automatic bit [15:0] crc_div(input bitq_t msg, input bit [16:0] gen);
    bit work[$];
    bit [15:0] rem;
    work = msg;
    for (int i = 0; i < 16; i++) work.push_back(1'b0);
    for (int i = 0; i + 16 < work.size(); i++) begin
      if (work[i]) for (int j = 0; j <= 16; j++) work[i+j] ^= gen[16-j];
    end
    for (int j = 0; j < 16; j++) rem[15-j] = work[work.size()-16+j];
    return rem;
  endfunction

  localparam bit [16:0] GEN_CRC16 = 17'h18005;  // x^16 + x^15 + x^2 + 1

  // Octets to the on-air bit order (bit 0 of each octet first).
  function automatic bitq_t lsb_first(input byteq_t b);
    bitq_t q;
    foreach (b[i]) for (int k = 0; k < 8; k++) q.push_back(b[i][k]);
    return q;
  endfunction

  // The two FCS octets for a covered octet sequence.
  function automatic byteq_t fcs_octets(input byteq_t b);
    bit [15:0] r;
    byte unsigned o0, o1;
    r = crc_div(lsb_first(b), GEN_CRC16);
    for (int k = 0; k < 8; k++) begin
      o0[k] = r[15-k];
      o1[k] = r[7-k];
    end
    return '{o0, o1};
  endfunction

  // PPDU octets up to, not including, the FCS: 4 preamble octets, SFD, frame
  // length, then the MAC header fields in order and the payload.
  function automatic byteq_t ppdu_head(input zigbee_pkg::mac_hdr_t h, input byteq_t payload);
    byteq_t q;
    int psdu;
    psdu = 3 + (h.dst_en ? 2 : 0) + (h.src_en ? 2 : 0) + (h.sec_en ? 2 : 0)
         + payload.size() + 2;
    q = '{8'h00, 8'h00, 8'h00, 8'h00, 8'hA7, 8'(psdu)};
    q.push_back(h.frame_ctrl[7:0]); q.push_back(h.frame_ctrl[15:8]);
    q.push_back(h.seq_num);
    if (h.dst_en) begin q.push_back(h.dst_addr[7:0]); q.push_back(h.dst_addr[15:8]); end
    if (h.src_en) begin q.push_back(h.src_addr[7:0]); q.push_back(h.src_addr[15:8]); end
    if (h.sec_en) begin q.push_back(h.sec_ctrl); q.push_back(h.key_id); end
    foreach (payload[i]) q.push_back(payload[i]);
    return q;
  endfunction

  localparam int SHR_PHR_OCTETS = 6;   // octets not covered by the FCS

  // Complete PPDU including the FCS.
  function automatic byteq_t ppdu_full(input zigbee_pkg::mac_hdr_t h, input byteq_t payload);
    byteq_t q, mac, f;
    q = ppdu_head(h, payload);
    mac = q[SHR_PHR_OCTETS:$];
    f = fcs_octets(mac);
    q.push_back(f[0]); q.push_back(f[1]);
    return q;
  endfunction

  function automatic zigbee_pkg::mac_hdr_t random_hdr(input int max_payload);
    zigbee_pkg::mac_hdr_t h;
    h.frame_ctrl  = 16'($urandom);
    h.seq_num     = 8'($urandom);
    h.dst_en      = 1'($urandom);
    h.dst_addr    = 16'($urandom);
    h.src_en      = 1'($urandom);
    h.src_addr    = 16'($urandom);
    h.sec_en      = 1'($urandom);
    h.sec_ctrl    = 8'($urandom);
    h.key_id      = 8'($urandom);
    h.payload_len = 7'($urandom_range(0, max_payload));
    return h;
  endfunction

  // The acknowledgement frame: frame control and sequence number only.
  function automatic zigbee_pkg::mac_hdr_t ack_hdr(input logic [7:0] seq);
    zigbee_pkg::mac_hdr_t h;
    h = '0;
    h.frame_ctrl = 16'h0002;   // frame type 010: acknowledgement
    h.seq_num    = seq;
    return h;
  endfunction

  // Chip sequences, c0 first (leftmost).
  localparam bit [31:0] CHIPS [16] = '{
    32'b11011001110000110101001000101110,
    32'b11101101100111000011010100100010,
    32'b00101110110110011100001101010010,
    32'b00100010111011011001110000110101,
    32'b01010010001011101101100111000011,
    32'b00110101001000101110110110011100,
    32'b11000011010100100010111011011001,
    32'b10011100001101010010001011101101,
    32'b10001100100101100000011101111011,
    32'b10111000110010010110000001110111,
    32'b01111011100011001001011000000111,
    32'b01110111101110001100100101100000,
    32'b00000111011110111000110010010110,
    32'b01100000011101111011100011001001,
    32'b10010110000001110111101110001100,
    32'b11001001011000000111011110111000
  };

  function automatic bit chip_ref(input int sym, input int k);
    return CHIPS[sym][31-k];
  endfunction

  // Half-sine pulse sample k of a pulse 2*spc samples long, amplitude amp.
  function automatic int half_sine(input int k, input int spc, input int amp);
    real v;
    v = amp * $sin(3.14159265358979 * k / (2.0 * spc));
    return $rtoi(v + 0.5);
  endfunction

endpackage
