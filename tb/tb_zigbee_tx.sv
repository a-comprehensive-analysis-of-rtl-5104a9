// tb_zigbee_tx: end-to-end test of the transmitter at its default
// parameters (4 samples per chip, 8-bit samples, an 8 MHz clock).
//
// Frames: an acknowledgement frame from idle (11 octets, 22 symbols, 704
// chips), a frame with every optional field and a payload started back to
// back with it, an oversized frame that must be refused, and random frames
// whose payload arrives with gaps. A reference model builds each PPDU with
// its FCS, splits it into symbols, spreads them with the tabulated chip
// sequences and predicts every I and Q sample; the testbench compares the
// chip stream, every output sample and the frame timing (one chip each 4
// clocks, so 250 kbit/s, and 2816 clocks of chips for the acknowledgement
// frame). It also counts the mechanisms of the design - upstream stalls,
// payload gaps, back-to-back frames, refused frames, idle gaps in the chip
// stream, each optional field - and fails if one never happened.
module tb_zigbee_tx;
  import zigbee_pkg::*;
  import zigbee_ref_pkg::*;

  localparam int SPC = 4;
  localparam int AMP = 127;

  logic clk = 0, rst_n = 0, start = 0;
  mac_hdr_t hdr = '0;
  logic len_err;
  logic [7:0] pl_data = 0;
  logic pl_valid = 0, pl_ready;
  logic chip, chip_stb, i_bit, q_bit;
  logic signed [7:0] i_sample, q_sample;
  logic tx_busy, tx_done;
  int checks = 0, failures = 0;

  zigbee_tx dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---- reference ------------------------------------------------------------
  bit exp_chips[$];      // every chip of every accepted frame, in order
  int frame_chips[$];    // chips per accepted frame

  function automatic void add_frame(input mac_hdr_t h, input byteq_t pl);
    byteq_t p = ppdu_full(h, pl);
    foreach (p[i]) for (int half = 0; half < 2; half++) begin
      int s = (half != 0) ? int'(p[i][7:4]) : int'(p[i][3:0]);
      for (int k = 0; k < 32; k++) exp_chips.push_back(chip_ref(s, k));
    end
    frame_chips.push_back(p.size() * 64);
  endfunction

  // ---- mechanism counters ---------------------------------------------------
  int n_stall_framer = 0, n_stall_fcs = 0, n_pl_gap = 0, n_back_to_back = 0;
  int n_refused = 0, n_chip_idle = 0, n_dst = 0, n_src = 0, n_sec = 0, n_payload = 0;
  int n_ack = 0, n_done = 0, n_ack_symbols = 0, n_ack_octets = 0;
  bit ack_sym_end = 0, ack_oct_end = 0;

  // ---- stimulus -------------------------------------------------------------
  task automatic send(input mac_hdr_t h, input bit pl_gaps, input bit expect_ok);
    automatic byteq_t pl;
    automatic int sent = 0;
    automatic bit taken = 0;
    for (int i = 0; i < int'(h.payload_len); i++) pl.push_back(8'($urandom));
    @(negedge clk);
    while (dut.fr_busy) @(negedge clk);
    if (tx_busy) n_back_to_back++;
    hdr = h; start = 1;
    @(negedge clk);
    start = 0;
    if (!expect_ok) begin
      check(len_err, "oversized frame refused");
      if (len_err) n_refused++;
      return;
    end
    check(!len_err, "legal frame accepted");
    add_frame(h, pl);
    if (h.dst_en) n_dst++;
    if (h.src_en) n_src++;
    if (h.sec_en) n_sec++;
    if (h.payload_len != 0) n_payload++;
    while (sent < pl.size()) begin
      if (taken) begin pl_valid = 0; taken = 0; end
      if (!pl_valid) begin
        if (pl_gaps && $urandom_range(0, 1) == 0) n_pl_gap++;
        else begin pl_data = pl[sent]; pl_valid = 1; end
      end
      #1;
      if (pl_valid && pl_ready) begin sent++; taken = 1; end
      @(negedge clk);
    end
    pl_valid = 0;
  endtask

  // ---- checking -------------------------------------------------------------
  int cyc = 0;
  int exp_i[int], exp_q[int];    // predicted samples by clock number
  int chip_n = 0, frame_n = 0, chip_in_frame = 0, last_chip_cyc = -1, frame_first_cyc = 0;
  int frame_len_cycles[$];
  int done_at[$];          // clock of each frame's last Q sample

  always @(negedge clk) begin
    cyc++;
    if (rst_n) begin
      if (dut.fr_valid && !dut.fr_ready) n_stall_framer++;
      if (dut.ppdu_valid && !dut.ppdu_ready) n_stall_fcs++;
      // octets and symbols of the first frame, up to its last flags
      if (dut.sym_valid && dut.sym_ready && !ack_sym_end) begin
        n_ack_symbols++;
        ack_sym_end = dut.sym_last;
      end
      if (dut.ppdu_valid && dut.ppdu_ready && !ack_oct_end) begin
        n_ack_octets++;
        ack_oct_end = dut.ppdu_last;
      end
      if (tx_done) begin
        n_done++;
        check(done_at.size() > 0 && cyc == done_at.pop_front(),
              $sformatf("tx_done at clock %0d with the last sample of a frame", cyc));
      end
      // samples
      check(int'(i_sample) == (exp_i.exists(cyc) ? exp_i[cyc] : 0) &&
            int'(q_sample) == (exp_q.exists(cyc) ? exp_q[cyc] : 0),
            $sformatf("clock %0d: I %0d Q %0d expected I %0d Q %0d", cyc, i_sample, q_sample,
                      exp_i.exists(cyc) ? exp_i[cyc] : 0, exp_q.exists(cyc) ? exp_q[cyc] : 0));
      if (chip_stb) begin
        bit e;
        e = (chip_n < exp_chips.size()) ? exp_chips[chip_n] : 1'b0;
        check(chip_n < exp_chips.size() && chip == e,
              $sformatf("chip %0d (frame %0d chip %0d): got %0b expected %0b", chip_n, frame_n,
                        chip_in_frame, chip, e));
        if (chip_in_frame == 0) frame_first_cyc = cyc;
        else check(cyc - last_chip_cyc == SPC,
                   $sformatf("chip spacing %0d in frame %0d", cyc - last_chip_cyc, frame_n));
        if (chip_in_frame == 0 && last_chip_cyc >= 0 && cyc - last_chip_cyc != SPC) n_chip_idle++;
        // predicted pulse: starts two clocks after the chip strobe
        for (int k = 0; k < 2 * SPC; k++) begin
          int v;
          v = half_sine(k, SPC, AMP);
          if (!chip) v = -v;
          if (chip_in_frame % 2 == 0) exp_i[cyc + 2 + k] = v;
          else                        exp_q[cyc + 2 + k] = v;
        end
        last_chip_cyc = cyc;
        chip_n++;
        chip_in_frame++;
        if (chip_in_frame == frame_chips[frame_n]) begin
          frame_len_cycles.push_back(cyc - frame_first_cyc + SPC);
          done_at.push_back(cyc + 2 * SPC + 1);
          frame_n++;
          chip_in_frame = 0;
        end
      end
    end
  end

  initial begin
    mac_hdr_t h;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(negedge clk);
    check(!tx_busy && i_sample == 0 && q_sample == 0, "idle after reset");

    // 1. acknowledgement frame from idle
    send(ack_hdr(8'h3C), 0, 1);
    n_ack++;
    // 2. every optional field and a payload, back to back with frame 1
    h = random_hdr(0);
    h.dst_en = 1; h.src_en = 1; h.sec_en = 1; h.payload_len = 7'd4;
    send(h, 0, 1);
    // 3. oversized: 9 + 117 + 2 > 127
    h.payload_len = 7'd117;
    send(h, 0, 0);
    // wait for the line to go quiet, then random frames with payload gaps
    wait (n_done == 2);
    repeat (50) @(negedge clk);
    for (int t = 0; t < 3; t++) begin
      h = random_hdr(6);
      send(h, 1, 1);
    end
    wait (n_done == 5);
    repeat (20) @(negedge clk);

    check(chip_n == exp_chips.size(), $sformatf("all %0d chips sent (%0d)", exp_chips.size(), chip_n));
    check(frame_chips[0] == 704, "acknowledgement frame is 704 chips");
    check(n_ack_octets == 11 && n_ack_symbols == 22,
          $sformatf("acknowledgement frame: %0d octets (11), %0d symbols (22)", n_ack_octets, n_ack_symbols));
    check(frame_len_cycles[0] == 704 * SPC,
          $sformatf("acknowledgement frame lasts %0d clocks (352 us at 8 MHz)", frame_len_cycles[0]));
    check(!tx_busy, "idle at the end");
    check(n_done == 5, $sformatf("tx_done per frame (%0d)", n_done));
    check(n_stall_framer > 0, "framer stalled by the CRC block");
    check(n_stall_fcs > 0, "CRC block stalled by the symbol stage");
    check(n_pl_gap > 0, "payload gap");
    check(n_back_to_back > 0, "back-to-back frame");
    check(n_refused > 0, "oversized frame refused");
    check(n_chip_idle > 0, "chip stream idle between frames");
    check(n_dst > 0 && n_src > 0 && n_sec > 0 && n_payload > 0, "optional fields sent");
    $display("frames %0d (ack %0d), chips %0d, stalls framer %0d fcs %0d, payload gaps %0d,",
             frame_n, n_ack, chip_n, n_stall_framer, n_stall_fcs, n_pl_gap);
    $display("back-to-back %0d, refused %0d, idle gaps %0d, dst %0d src %0d sec %0d payload %0d",
             n_back_to_back, n_refused, n_chip_idle, n_dst, n_src, n_sec, n_payload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
