// zigbee_tx: IEEE 802.15.4 / ZigBee 2.4 GHz digital transmitter.
//
// One frame travels through the chain
//   ppdu_framer -> fcs_inserter (CRC-16) -> bit_to_symbol -> symbol_to_chip
//   -> oqpsk_mod -> half_sine_shaper (I) and half_sine_shaper (Q)
// and leaves as signed baseband I/Q samples for a DAC and RF front end. This
// order of blocks, the CRC-16 frame check sequence, the 4-bit symbols, the
// 2 Mchip/s direct-sequence spreading, O-QPSK and half-sine shaping are the
// design's. The clock rate is this implementation's choice: the clock runs
// at SAMPLES_PER_CHIP samples per chip, i.e. 8 MHz for the default 4, and a
// free-running divider makes the chip strobe. The chip stage sets the pace:
// upstream blocks stall on valid/ready until it takes the next symbol, so a
// frame goes out at exactly 250 kbit/s (32 clocks per bit at the default).
//
// Interface: start (one clock) with hdr starts a frame; len_err refuses one
// longer than 127 PSDU octets. Payload octets come on pl_* (valid/ready). A
// new start is taken as soon as the previous frame's octets have left the
// framer, so frames can follow back to back. Outputs: i_sample/q_sample (one
// per clock, 0 when idle), the rail bits, the chip stream with its strobe,
// tx_busy while anything of a frame is in flight and tx_done for one clock,
// with the last sample of each frame.
module zigbee_tx
  import zigbee_pkg::*;
#(
  parameter int unsigned SAMPLES_PER_CHIP = 4,
  parameter int unsigned SAMPLE_W         = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  mac_hdr_t                   hdr,
  output logic                       len_err,
  input  logic [7:0]                 pl_data,
  input  logic                       pl_valid,
  output logic                       pl_ready,
  output logic                       chip,
  output logic                       chip_stb,
  output logic                       i_bit,
  output logic                       q_bit,
  output logic signed [SAMPLE_W-1:0] i_sample,
  output logic signed [SAMPLE_W-1:0] q_sample,
  output logic                       tx_busy,
  output logic                       tx_done
);

  // ---- chip-rate strobe -----------------------------------------------------
  localparam int unsigned DIV_W = (SAMPLES_PER_CHIP > 1) ? $clog2(SAMPLES_PER_CHIP) : 1;
  logic [DIV_W-1:0] div_q;
  logic             chip_tick;

  always_ff @(posedge clk) begin
    if (!rst_n || chip_tick) div_q <= '0;
    else                     div_q <= div_q + 1'b1;
  end
  assign chip_tick = (div_q == DIV_W'(SAMPLES_PER_CHIP - 1));

  // ---- frame octets ---------------------------------------------------------
  logic [7:0] fr_data;
  logic       fr_crc, fr_last, fr_valid, fr_ready, fr_busy;

  ppdu_framer u_framer (
    .clk, .rst_n, .start, .hdr, .len_err,
    .pl_data, .pl_valid, .pl_ready,
    .out_data (fr_data),
    .out_crc  (fr_crc),
    .out_last (fr_last),
    .out_valid(fr_valid),
    .out_ready(fr_ready),
    .busy     (fr_busy)
  );

  logic [7:0] ppdu_data;
  logic       ppdu_last, ppdu_valid, ppdu_ready, fcs_busy;

  fcs_inserter u_fcs (
    .clk, .rst_n,
    .in_data  (fr_data),
    .in_crc   (fr_crc),
    .in_last  (fr_last),
    .in_valid (fr_valid),
    .in_ready (fr_ready),
    .out_data (ppdu_data),
    .out_last (ppdu_last),
    .out_valid(ppdu_valid),
    .out_ready(ppdu_ready),
    .busy     (fcs_busy)
  );

  // ---- symbols and chips ----------------------------------------------------
  logic [3:0] sym;
  logic       sym_last, sym_valid, sym_ready, b2s_busy;

  bit_to_symbol u_b2s (
    .clk, .rst_n,
    .in_data  (ppdu_data),
    .in_last  (ppdu_last),
    .in_valid (ppdu_valid),
    .in_ready (ppdu_ready),
    .out_sym  (sym),
    .out_last (sym_last),
    .out_valid(sym_valid),
    .out_ready(sym_ready),
    .busy     (b2s_busy)
  );

  logic chip_odd, chip_last, s2c_busy;

  symbol_to_chip u_s2c (
    .clk, .rst_n, .chip_tick,
    .in_sym     (sym),
    .in_last    (sym_last),
    .in_valid   (sym_valid),
    .in_ready   (sym_ready),
    .chip_o     (chip),
    .chip_stb_o (chip_stb),
    .chip_odd_o (chip_odd),
    .chip_last_o(chip_last),
    .busy       (s2c_busy)
  );

  // ---- O-QPSK and pulse shaping ---------------------------------------------
  logic i_start, q_start, q_last;

  oqpsk_mod u_oqpsk (
    .clk, .rst_n,
    .chip_i     (chip),
    .chip_stb_i (chip_stb),
    .chip_odd_i (chip_odd),
    .chip_last_i(chip_last),
    .i_bit, .q_bit, .i_start, .q_start, .q_last
  );

  logic i_active, q_active;

  half_sine_shaper #(.SAMPLES_PER_CHIP(SAMPLES_PER_CHIP), .SAMPLE_W(SAMPLE_W)) u_shape_i (
    .clk, .rst_n, .start(i_start), .bit_i(i_bit), .sample(i_sample), .active(i_active)
  );

  half_sine_shaper #(.SAMPLES_PER_CHIP(SAMPLES_PER_CHIP), .SAMPLE_W(SAMPLE_W)) u_shape_q (
    .clk, .rst_n, .start(q_start), .bit_i(q_bit), .sample(q_sample), .active(q_active)
  );

  // ---- frame status ---------------------------------------------------------
  // tx_done: high during the last sample of the Q pulse that carries the
  // frame's last chip, counted from its start (also when the next frame
  // follows without a gap).
  localparam int unsigned PULSE_LEN = 2 * SAMPLES_PER_CHIP;
  localparam int unsigned DONE_W    = $clog2(PULSE_LEN + 1);
  logic [DONE_W-1:0] done_cnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n)                  done_cnt_q <= '0;
    else if (q_last)             done_cnt_q <= DONE_W'(PULSE_LEN);
    else if (done_cnt_q != '0)   done_cnt_q <= done_cnt_q - 1'b1;
  end

  assign tx_done = (done_cnt_q == DONE_W'(1));
  assign tx_busy = fr_busy | fcs_busy | b2s_busy | s2c_busy | i_active | q_active;

endmodule
