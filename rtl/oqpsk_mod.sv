// oqpsk_mod: offset-QPSK chip splitter.
//
// Even-indexed chips (c0, c2, ...) go to the in-phase rail and odd-indexed
// chips to the quadrature rail. Each rail therefore runs at half the chip
// rate, every rail value lasts two chip periods, and the Q rail changes one
// chip period after the I rail, which is the offset that gives O-QPSK its
// constant envelope. The modulation scheme is the design's; this form (two
// registers and start strobes for a pulse shaper) is the simplest one.
//
// Interface: chip_stb_i marks a new chip on chip_i, chip_odd_i its index
// parity. i_bit/q_bit hold the current rail values (1 = +1, 0 = -1);
// i_start/q_start pulse for one clock, one clock after the chip strobe, when
// a new rail symbol begins. chip_last_i, on the frame's last chip, makes
// q_last pulse together with that last Q start.
module oqpsk_mod (
  input  logic clk,
  input  logic rst_n,
  input  logic chip_i,
  input  logic chip_stb_i,
  input  logic chip_odd_i,
  input  logic chip_last_i,
  output logic i_bit,
  output logic q_bit,
  output logic i_start,
  output logic q_start,
  output logic q_last
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_bit   <= 1'b0;
      q_bit   <= 1'b0;
      i_start <= 1'b0;
      q_start <= 1'b0;
      q_last  <= 1'b0;
    end else begin
      i_start <= chip_stb_i & ~chip_odd_i;
      q_start <= chip_stb_i &  chip_odd_i;
      q_last  <= chip_stb_i &  chip_odd_i & chip_last_i;
      if (chip_stb_i && !chip_odd_i) i_bit <= chip_i;
      if (chip_stb_i &&  chip_odd_i) q_bit <= chip_i;
    end
  end

endmodule
