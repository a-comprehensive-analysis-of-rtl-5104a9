// bit_to_symbol: splits each PPDU octet into two 4-bit data symbols.
//
// Bits b0..b3 of an octet form the first symbol and b4..b7 the next one, so
// the octets of the PPDU (preamble first, last PSDU octet last) leave as a
// symbol stream at twice the octet rate: the 11-octet acknowledgement PPDU
// becomes 22 symbols. This nibble order is the design's specification.
//
// Interface: valid/ready octet input with a last flag, valid/ready symbol
// output; out_last marks the high nibble of the last octet. One octet is
// held at a time; an octet is accepted in the cycle its second symbol
// leaves, so a continuous stream loses no cycle. Output is registered.
module bit_to_symbol (
  input  logic       clk,
  input  logic       rst_n,
  // octet stream in
  input  logic [7:0] in_data,
  input  logic       in_last,
  input  logic       in_valid,
  output logic       in_ready,
  // symbol stream out
  output logic [zigbee_pkg::SYMBOL_BITS-1:0] out_sym,
  output logic       out_last,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       busy
);

  logic [7:0] octet_q;
  logic       last_q;
  logic       full_q;    // an octet is held
  logic       high_q;    // the high nibble is the one on the output

  wire out_fire = out_valid & out_ready;
  wire in_fire  = in_valid & in_ready;

  // Room for a new octet once the held one's high nibble leaves.
  assign in_ready  = !full_q || (high_q && out_ready);
  assign out_valid = full_q;
  assign out_sym   = high_q ? octet_q[7:4] : octet_q[3:0];
  assign out_last  = high_q & last_q;
  assign busy      = full_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      octet_q <= '0;
      last_q  <= 1'b0;
      full_q  <= 1'b0;
      high_q  <= 1'b0;
    end else if (in_fire) begin
      octet_q <= in_data;
      last_q  <= in_last;
      full_q  <= 1'b1;
      high_q  <= 1'b0;
    end else if (out_fire) begin
      if (high_q) full_q <= 1'b0;
      high_q <= ~high_q;
    end
  end

  // The producer must hold its octet steady until it is taken.
  logic       stall_q;
  logic [8:0] stall_word_q;
  always_ff @(posedge clk) begin
    stall_q      <= rst_n & in_valid & ~in_ready;
    stall_word_q <= {in_last, in_data};
    if (rst_n && stall_q)
      assert (in_valid && {in_last, in_data} == stall_word_q)
        else $error("bit_to_symbol: input octet changed before it was accepted");
  end

endmodule
