// crc16_lfsr: bit-serial CRC-16 generator, one message bit per enabled clock.
//
// It is the classic shift-register divider: one flip-flop per remainder bit,
// with the feedback (top stage XOR the incoming data bit) fed into stage 0
// and XORed into every stage whose power of x appears in the generator. With
// the default POLY this is exactly the circuit for x^16 + x^15 + x^2 + 1:
// XOR gates in front of stages x^2 and x^15 and a plain feedback into x^0.
// After the last message bit the register holds the remainder of
// message(x) * x^16 divided by the generator; the highest bit (crc[15]) is the
// first to be sent. Feeding the message and then that remainder (highest bit
// first) leaves the register at zero, which is how a receiver checks a frame.
//
// Interface: clear (synchronous) loads INIT; en with din shifts one bit in.
// clear wins over en. crc is the register, valid one clock after the last en.
// The polynomial is the design's; the initial value zero is an assumption.
module crc16_lfsr #(
  parameter int unsigned WIDTH = 16,
  parameter logic [WIDTH-1:0] POLY = zigbee_pkg::CRC16_POLY,
  parameter logic [WIDTH-1:0] INIT = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic             din,
  output logic [WIDTH-1:0] crc
);

  logic fb;
  assign fb = crc[WIDTH-1] ^ din;

  always_ff @(posedge clk) begin
    if (!rst_n)      crc <= INIT;
    else if (clear)  crc <= INIT;
    else if (en)     crc <= {crc[WIDTH-2:0], 1'b0} ^ (fb ? POLY : '0);
  end

endmodule
