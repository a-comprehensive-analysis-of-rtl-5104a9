// tb_ppdu_framer: builds acknowledgement frames and random frames with every
// mix of optional fields and payload lengths, with random stalls on the
// output and gaps on the payload input. The octets must match the reference
// frame (preamble, SFD, length, header fields low octet first, payload),
// out_crc must mark exactly the MAC octets and out_last the final one. A
// frame whose PSDU would exceed 127 octets must be refused with len_err.
module tb_ppdu_framer;
  import zigbee_pkg::*;
  import zigbee_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, len_err;
  mac_hdr_t hdr = '0;
  logic [7:0] pl_data = 0;
  logic pl_valid = 0, pl_ready;
  logic [7:0] out_data;
  logic out_crc, out_last, out_valid, out_ready = 0, busy;
  int checks = 0, failures = 0;

  ppdu_framer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Sends one frame and checks every octet.
  task automatic run_frame(input mac_hdr_t h, input bit stalls);
    byteq_t payload, exp;
    int got = 0, pl_sent = 0;
    bit pl_taken = 0;
    for (int i = 0; i < int'(h.payload_len); i++) payload.push_back(8'($urandom));
    exp = ppdu_head(h, payload);
    @(negedge clk);
    hdr = h; start = 1;
    @(negedge clk);
    start = 0; hdr = random_hdr(127);    // the latched copy must be used
    while (got < exp.size()) begin
      if (pl_taken) begin pl_valid = 0; pl_taken = 0; end
      out_ready = stalls ? ($urandom_range(0, 2) != 0) : 1'b1;
      if (!pl_valid && pl_sent < payload.size() && !(stalls && $urandom_range(0, 2) == 0)) begin
        pl_data = payload[pl_sent]; pl_valid = 1;
      end
      #1;
      if (pl_valid && pl_ready) begin pl_sent++; pl_taken = 1; end
      if (out_valid && out_ready) begin
        check(out_data == exp[got] && out_crc == (got >= SHR_PHR_OCTETS) &&
              out_last == (got == exp.size() - 1),
              $sformatf("octet %0d: got %h crc %0b last %0b expected %h", got,
                        out_data, out_crc, out_last, exp[got]));
        got++;
      end
      @(negedge clk);
    end
    pl_valid = 0; pl_taken = 0;
    check(!busy && !out_valid, "idle after the frame");
  endtask

  initial begin
    mac_hdr_t h;
    byteq_t e, none;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // The acknowledgement frame: 11 octets, PSDU length 5.
    h = ack_hdr(8'h5A);
    e = ppdu_head(h, none);
    check(e.size() == 9, "reference: ack frame is 9 octets before the FCS");
    run_frame(h, 0);
    run_frame(h, 1);

    // A frame with every field and a payload.
    h = random_hdr(0);
    h.dst_en = 1; h.src_en = 1; h.sec_en = 1; h.payload_len = 7'd10;
    run_frame(h, 1);

    // Random mixes, including the longest legal frame.
    for (int t = 0; t < 60; t++) begin
      h = random_hdr(122);
      // keep the PSDU within 127 octets
      if (9 + int'(h.payload_len) > 125) h.dst_en = 0;
      if (7 + int'(h.payload_len) > 125) h.src_en = 0;
      if (5 + int'(h.payload_len) > 125) h.sec_en = 0;
      run_frame(h, t % 2 == 0);
    end
    h = random_hdr(0); h.dst_en = 1; h.src_en = 1; h.sec_en = 1; h.payload_len = 7'd116;
    run_frame(h, 0);

    // Too long: 9 + 117 + 2 = 128 octets of PSDU.
    h.payload_len = 7'd117;
    @(negedge clk);
    hdr = h; start = 1;
    @(negedge clk);
    start = 0;
    check(len_err && !busy, "oversized frame refused");
    @(negedge clk);
    check(!len_err && !busy && !out_valid, "no frame after refusal");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
