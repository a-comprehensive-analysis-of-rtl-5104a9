// fcs_inserter: the CRC block of the transmitter.
//
// Octets pass through unchanged; those marked in_crc (MAC header and
// payload) are also shifted, least significant bit first as they go on air,
// through the bit-serial CRC-16 register (crc16_lfsr), eight clocks per
// octet. After the octet marked in_last the 16-bit remainder is appended as
// the frame check sequence, highest remainder bit first on air: the first
// FCS octet carries r15 in its bit 0 and r8 in bit 7, the second r7..r0. A
// receiver that runs the whole MAC frame, FCS included, through the same
// register is left with zero. The register is cleared after each FCS.
// The generator and the appending of the remainder are the design's; the
// bit order and the zero initial value follow IEEE 802.15.4.
//
// Interface: valid/ready octet streams in and out. An octet is taken, takes
// 8 clocks in the CRC if covered, and is then offered on the output; the
// block holds one octet at a time (about 10 clocks per octet, far faster
// than the 256 clocks per octet the radio needs at 4 samples per chip).
// out_last marks the second FCS octet.
module fcs_inserter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] in_data,
  input  logic       in_crc,
  input  logic       in_last,
  input  logic       in_valid,
  output logic       in_ready,
  output logic [7:0] out_data,
  output logic       out_last,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       busy
);

  typedef enum logic [2:0] {S_IN, S_SHIFT, S_OUT, S_FCS_HI, S_FCS_LO} state_e;

  state_e     state_q;
  logic [7:0] octet_q;
  logic       last_q;
  logic [2:0] bit_q;
  logic [15:0] crc;

  wire in_fire  = in_valid && in_ready;
  wire out_fire = out_valid && out_ready;

  crc16_lfsr u_crc (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(state_q == S_FCS_LO && out_fire),
    .en   (state_q == S_SHIFT),
    .din  (octet_q[bit_q]),
    .crc  (crc)
  );

  function automatic logic [7:0] reverse8(input logic [7:0] b);
    for (int i = 0; i < 8; i++) reverse8[i] = b[7-i];
  endfunction

  assign in_ready  = (state_q == S_IN);
  assign out_valid = (state_q == S_OUT) || (state_q == S_FCS_HI) || (state_q == S_FCS_LO);
  assign out_last  = (state_q == S_FCS_LO);
  assign busy      = (state_q != S_IN);

  always_comb begin
    case (state_q)
      S_FCS_HI: out_data = reverse8(crc[15:8]);
      S_FCS_LO: out_data = reverse8(crc[7:0]);
      default:  out_data = octet_q;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IN;
      octet_q <= '0;
      last_q  <= 1'b0;
      bit_q   <= '0;
    end else begin
      case (state_q)
        S_IN: if (in_fire) begin
          octet_q <= in_data;
          last_q  <= in_last;
          bit_q   <= '0;
          state_q <= in_crc ? S_SHIFT : S_OUT;
        end
        S_SHIFT: begin
          bit_q <= bit_q + 3'd1;
          if (bit_q == 3'd7) state_q <= S_OUT;
        end
        S_OUT:    if (out_fire) state_q <= last_q ? S_FCS_HI : S_IN;
        S_FCS_HI: if (out_fire) state_q <= S_FCS_LO;
        S_FCS_LO: if (out_fire) state_q <= S_IN;
        default:  state_q <= S_IN;
      endcase
    end
  end

endmodule
