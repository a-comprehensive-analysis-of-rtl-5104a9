// tb_crc16_detect: error-detection properties of the CRC-16 frame check.
//
// A receiver divides the MAC frame plus its FCS with crc16_lfsr; a clean
// frame leaves zero. The testbench corrupts acknowledgement frames and
// random frames with payload and checks that the register is then non-zero
// for every single-bit error, every double-bit error, every odd number of
// bit errors and every burst of 2..16 bits (first and last bit flipped,
// bits in between random). Bursts of 17..40 bits are only counted: the
// code cannot catch all of them, and the share it misses is reported.
module tb_crc16_detect;
  import zigbee_pkg::*;
  import zigbee_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, en = 0, din = 0;
  logic [15:0] crc;
  int checks = 0, failures = 0;

  crc16_lfsr rx (.clk, .rst_n, .clear, .en, .din, .crc);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs one received bit stream through the divider, returns the remainder.
  task automatic divide(input bitq_t q, output logic [15:0] rem);
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    foreach (q[i]) begin
      en = 1; din = q[i];
      @(negedge clk);
    end
    en = 0;
    rem = crc;
  endtask

  task automatic expect_detect(input bitq_t q, input string what);
    logic [15:0] r;
    divide(q, r);
    checks++;
    if (r == 16'h0000) begin failures++; $display("FAIL undetected: %s", what); end
  endtask

  function automatic bitq_t frame_bits(input mac_hdr_t h);
    byteq_t pl, p;
    for (int i = 0; i < int'(h.payload_len); i++) pl.push_back(8'($urandom));
    p = ppdu_full(h, pl);
    return lsb_first(p[SHR_PHR_OCTETS:$]);
  endfunction

  initial begin
    bitq_t good, bad;
    logic [15:0] r;
    int n, a, b, len, missed17, tried17;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    missed17 = 0; tried17 = 0;
    for (int f = 0; f < 6; f++) begin
      good = frame_bits((f < 2) ? ack_hdr(8'($urandom)) : random_hdr(40));
      n = good.size();
      divide(good, r);
      checks++;
      if (r != 0) begin failures++; $display("FAIL clean frame %0d leaves %h", f, r); end

      // every single-bit error
      for (int i = 0; i < n; i++) begin
        bad = good; bad[i] = ~bad[i];
        expect_detect(bad, $sformatf("frame %0d single bit %0d", f, i));
      end
      // double-bit errors
      for (int t = 0; t < 100; t++) begin
        a = $urandom_range(0, n - 1);
        do b = $urandom_range(0, n - 1); while (b == a);
        bad = good; bad[a] = ~bad[a]; bad[b] = ~bad[b];
        expect_detect(bad, $sformatf("frame %0d double bits %0d %0d", f, a, b));
      end
      // odd numbers of errors: 3, 5, 7 or 9 distinct bits
      for (int t = 0; t < 100; t++) begin
        automatic int k;
        automatic int flipped[$];
        k = 3 + 2 * $urandom_range(0, 3);
        bad = good;
        while (flipped.size() < k) begin
          a = $urandom_range(0, n - 1);
          if (!(a inside {flipped})) begin flipped.push_back(a); bad[a] = ~bad[a]; end
        end
        expect_detect(bad, $sformatf("frame %0d %0d errors", f, k));
      end
      // bursts up to 16 bits
      for (int t = 0; t < 100; t++) begin
        len = $urandom_range(2, 16);
        a = $urandom_range(0, n - len);
        bad = good;
        bad[a] = ~bad[a]; bad[a+len-1] = ~bad[a+len-1];
        for (int i = a + 1; i < a + len - 1; i++) if ($urandom_range(0, 1) != 0) bad[i] = ~bad[i];
        expect_detect(bad, $sformatf("frame %0d burst of %0d at %0d", f, len, a));
      end
      // longer bursts: counted only
      if (n >= 40) for (int t = 0; t < 100; t++) begin
        len = $urandom_range(17, 40);
        a = $urandom_range(0, n - len);
        bad = good;
        bad[a] = ~bad[a]; bad[a+len-1] = ~bad[a+len-1];
        for (int i = a + 1; i < a + len - 1; i++) if ($urandom_range(0, 1) != 0) bad[i] = ~bad[i];
        divide(bad, r);
        tried17++;
        if (r == 0) missed17++;
      end
    end
    $display("bursts of 17..40 bits: %0d of %0d undetected", missed17, tried17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
