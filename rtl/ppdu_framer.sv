// ppdu_framer: sends the octets of one PHY frame (PPDU) in transmit order.
//
// The frame is: preamble (4 octets), start-of-frame delimiter, frame length,
// then the MAC frame - frame control (2), sequence number (1), destination
// address, source address, security control, key identifier, payload - whose
// 2-octet FCS is appended downstream by fcs_inserter. This field order is the
// design's MAC algorithm; the acknowledgement frame, its main configuration,
// carries only frame control and sequence number, giving the 11-octet PPDU.
// Which optional fields are sent is chosen per frame by the *_en flags of
// the header (addresses are 16-bit short addresses, security control and key
// identifier one octet each: choices of this implementation). Multi-octet
// fields go low octet first. The frame length octet counts the PSDU
// (MAC header + payload + FCS) and must not exceed 127; a start whose frame
// would be longer is refused with a one-clock len_err.
//
// Interface: start (one clock, taken when not busy) latches hdr. Payload
// octets are pulled from the pl_* valid/ready stream, payload_len of them.
// Output is a valid/ready octet stream; out_crc marks octets covered by the
// FCS (the MAC header and payload) and out_last the last octet before the
// FCS. Header octets are offered one per clock while out_ready is high.
module ppdu_framer
  import zigbee_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  mac_hdr_t   hdr,
  output logic       len_err,
  // payload octets
  input  logic [7:0] pl_data,
  input  logic       pl_valid,
  output logic       pl_ready,
  // PPDU octets without FCS
  output logic [7:0] out_data,
  output logic       out_crc,
  output logic       out_last,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       busy
);

  typedef enum logic [3:0] {
    F_IDLE, F_PREAMBLE, F_SFD, F_LEN, F_FC, F_SEQ,
    F_DST, F_SRC, F_SECCTL, F_KEYID, F_PAYLOAD
  } field_e;

  field_e   field_q;
  logic [6:0] cnt_q;     // octet index inside the field
  mac_hdr_t hdr_q;

  // MAC header length (frame control + sequence number + optional fields).
  function automatic logic [7:0] psdu_len(input logic dst_en, input logic src_en,
                                          input logic sec_en, input logic [6:0] payload_len);
    return 8'd3 + (dst_en ? 8'd2 : 8'd0) + (src_en ? 8'd2 : 8'd0)
                + (sec_en ? 8'd2 : 8'd0) + {1'b0, payload_len}
                + 8'(FCS_OCTETS);
  endfunction

  // Field that follows f in this frame; F_IDLE once only the FCS is left.
  function automatic field_e next_field(input field_e f, input mac_hdr_t h);
    case (f)
      F_PREAMBLE: return F_SFD;
      F_SFD:      return F_LEN;
      F_LEN:      return F_FC;
      F_FC:       return F_SEQ;
      F_SEQ:      return h.dst_en ? F_DST : next_field(F_DST, h);
      F_DST:      return h.src_en ? F_SRC : next_field(F_SRC, h);
      F_SRC:      return h.sec_en ? F_SECCTL : next_field(F_KEYID, h);
      F_SECCTL:   return F_KEYID;
      F_KEYID:    return (h.payload_len != '0) ? F_PAYLOAD : F_IDLE;
      default:    return F_IDLE;
    endcase
  endfunction

  function automatic logic [6:0] field_len(input field_e f, input logic [6:0] payload_len);
    case (f)
      F_PREAMBLE:       return 7'(PREAMBLE_OCTETS);
      F_FC, F_DST, F_SRC: return 7'd2;
      F_PAYLOAD:        return payload_len;
      default:          return 7'd1;
    endcase
  endfunction

  logic [7:0] frame_len;
  assign frame_len = psdu_len(hdr_q.dst_en, hdr_q.src_en, hdr_q.sec_en, hdr_q.payload_len);

  wire start_ok   = start && (field_q == F_IDLE) && (psdu_len(hdr.dst_en, hdr.src_en, hdr.sec_en, hdr.payload_len) <= 8'(MAX_PSDU_OCTETS));
  wire field_end  = (cnt_q == field_len(field_q, hdr_q.payload_len) - 7'd1);
  wire fire       = out_valid && out_ready;

  assign busy     = (field_q != F_IDLE);
  assign out_crc  = (field_q >= F_FC);
  assign out_last = busy && field_end && (next_field(field_q, hdr_q) == F_IDLE);
  assign pl_ready = (field_q == F_PAYLOAD) && out_ready;

  always_comb begin
    out_valid = busy;
    out_data  = '0;
    case (field_q)
      F_PREAMBLE: out_data = PREAMBLE_OCTET;
      F_SFD:      out_data = SFD_OCTET;
      F_LEN:      out_data = frame_len & 8'h7F;   // bit 7 reserved
      F_FC:       out_data = cnt_q[0] ? hdr_q.frame_ctrl[15:8] : hdr_q.frame_ctrl[7:0];
      F_SEQ:      out_data = hdr_q.seq_num;
      F_DST:      out_data = cnt_q[0] ? hdr_q.dst_addr[15:8] : hdr_q.dst_addr[7:0];
      F_SRC:      out_data = cnt_q[0] ? hdr_q.src_addr[15:8] : hdr_q.src_addr[7:0];
      F_SECCTL:   out_data = hdr_q.sec_ctrl;
      F_KEYID:    out_data = hdr_q.key_id;
      F_PAYLOAD: begin
        out_data  = pl_data;
        out_valid = pl_valid;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      field_q <= F_IDLE;
      cnt_q   <= '0;
      hdr_q   <= '0;
      len_err <= 1'b0;
    end else begin
      len_err <= start && (field_q == F_IDLE) && !start_ok;
      if (start_ok) begin
        hdr_q   <= hdr;
        field_q <= F_PREAMBLE;
        cnt_q   <= '0;
      end else if (fire) begin
        if (field_end) begin
          field_q <= next_field(field_q, hdr_q);
          cnt_q   <= '0;
        end else begin
          cnt_q   <= cnt_q + 7'd1;
        end
      end
    end
  end

endmodule
