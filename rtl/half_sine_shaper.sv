// half_sine_shaper: half-sine pulse shaping of one O-QPSK rail.
//
// Every rail value (+1 or -1) is sent as one half period of a sine lasting
// two chip periods, p(k) = sin(pi * k / (2 * SAMPLES_PER_CHIP)) for sample
// k = 0 .. 2*SAMPLES_PER_CHIP-1, scaled to a signed SAMPLE_W-bit amplitude
// (2^(SAMPLE_W-1)-1) and negated for a 0 rail bit. One sample leaves per
// clock, so the clock must run at SAMPLES_PER_CHIP times the chip rate.
// Half-sine shaping is the design's; the sample rate and width are choices
// of this implementation. The pulse table is computed at elaboration from
// that formula, rounded to the nearest integer.
//
// Interface: start pulses for one clock when a new rail value is on bit; the
// pulse runs from the next clock. A start that arrives as a pulse ends
// continues the waveform seamlessly. With no pulse running the output is 0.
module half_sine_shaper #(
  parameter int unsigned SAMPLES_PER_CHIP = 4,
  parameter int unsigned SAMPLE_W         = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       bit_i,
  output logic signed [SAMPLE_W-1:0] sample,
  output logic                       active
);

  localparam int unsigned PULSE_LEN = 2 * SAMPLES_PER_CHIP;
  localparam int unsigned CNT_W     = $clog2(PULSE_LEN);
  localparam real         PI        = 3.14159265358979323846;

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  function automatic sample_t pulse_at(input int unsigned k);
    real a;
    a = (2.0 ** (SAMPLE_W - 1) - 1.0) * $sin(PI * k / PULSE_LEN);
    return sample_t'($rtoi(a + 0.5));
  endfunction

  function automatic sample_t [PULSE_LEN-1:0] make_table();
    sample_t [PULSE_LEN-1:0] t;
    for (int unsigned k = 0; k < PULSE_LEN; k++) t[k] = pulse_at(k);
    return t;
  endfunction

  localparam sample_t [PULSE_LEN-1:0] PULSE = make_table();

  logic [CNT_W-1:0] k_q;
  logic             bit_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      k_q    <= '0;
      bit_q  <= 1'b0;
      active <= 1'b0;
    end else if (start) begin
      k_q    <= '0;
      bit_q  <= bit_i;
      active <= 1'b1;
    end else if (active) begin
      if (k_q == CNT_W'(PULSE_LEN - 1)) active <= 1'b0;
      else                              k_q <= k_q + 1'b1;
    end
  end

  always_comb begin
    if (!active)    sample = '0;
    else if (bit_q) sample =  PULSE[k_q];
    else            sample = -PULSE[k_q];
  end

endmodule
