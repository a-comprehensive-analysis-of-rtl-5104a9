// symbol_to_chip: direct-sequence spreading of 4-bit data symbols.
//
// Each symbol is replaced by its 32-chip pseudo-noise sequence, sent chip c0
// first, one chip per chip_tick. At 2 Mchip/s this gives 62.5 ksymbol/s,
// i.e. 250 kbit/s, as the design specifies. The sequences are not stored in
// a table: symbol s (0..7) is the sequence of symbol 0 delayed cyclically by
// 4*s chips, and symbols 8..15 are symbols 0..7 with the odd chips inverted
// (IEEE 802.15.4, 2.4 GHz PHY; see zigbee_pkg::chip_of).
//
// Interface: valid/ready symbol input with a last flag. chip_tick is a
// one-clock strobe at the chip rate from the caller. On each tick while a
// symbol is held, the next chip appears on chip_o together with a one-clock
// chip_stb_o, its index parity chip_odd_o and chip_last_o on chip 31 of the
// last symbol. A new symbol is accepted in the cycle of the tick that sends
// chip 31 of the previous one, so back-to-back symbols leave no gap.
module symbol_to_chip (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       chip_tick,
  // symbol stream in
  input  logic [3:0] in_sym,
  input  logic       in_last,
  input  logic       in_valid,
  output logic       in_ready,
  // chip stream out
  output logic       chip_o,
  output logic       chip_stb_o,
  output logic       chip_odd_o,
  output logic       chip_last_o,
  output logic       busy
);

  logic [3:0] sym_q;
  logic       last_q;
  logic       full_q;
  logic [4:0] idx_q;

  wire send     = chip_tick & full_q;
  wire end_sym  = send & (idx_q == 5'(zigbee_pkg::CHIPS_PER_SYMBOL - 1));

  assign in_ready = !full_q || end_sym;
  assign busy     = full_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sym_q  <= '0;
      last_q <= 1'b0;
      full_q <= 1'b0;
      idx_q  <= '0;
    end else begin
      if (send) idx_q <= idx_q + 5'd1;
      if (in_valid && in_ready) begin
        sym_q  <= in_sym;
        last_q <= in_last;
        full_q <= 1'b1;
        idx_q  <= '0;
      end else if (end_sym) begin
        full_q <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      chip_o      <= 1'b0;
      chip_stb_o  <= 1'b0;
      chip_odd_o  <= 1'b0;
      chip_last_o <= 1'b0;
    end else begin
      chip_stb_o  <= send;
      chip_last_o <= end_sym & last_q;
      if (send) begin
        chip_o     <= zigbee_pkg::chip_of(sym_q, idx_q);
        chip_odd_o <= idx_q[0];
      end
    end
  end

endmodule
