// tb_fcs_inserter: streams acknowledgement frames and random frames through
// the CRC block with random gaps and stalls. The output must be the input
// octets followed by the two FCS octets of the reference (long division of
// the MAC octets, least significant bit first), out_last only on the second
// FCS octet, and a receiver dividing MAC octets plus FCS must find zero.
// Frames follow each other with no idle clock, so the register must also be
// cleared between frames.
module tb_fcs_inserter;
  import zigbee_pkg::*;
  import zigbee_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [7:0] in_data = 0;
  logic in_crc = 0, in_last = 0, in_valid = 0, in_ready;
  logic [7:0] out_data;
  logic out_last, out_valid, out_ready = 0, busy;
  int checks = 0, failures = 0;

  fcs_inserter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int FRAMES = 40;
  byteq_t in_q[FRAMES], exp_q[FRAMES];
  bit stalls = 0;

  initial begin
    byteq_t none;
    mac_hdr_t h;
    for (int f = 0; f < FRAMES; f++) begin
      automatic byteq_t pl;
      h = (f < 2) ? ack_hdr(8'(f)) : random_hdr(100);
      if (f < 2) pl = none;
      else for (int i = 0; i < int'(h.payload_len); i++) pl.push_back(8'($urandom));
      in_q[f]  = ppdu_head(h, pl);
      exp_q[f] = ppdu_full(h, pl);
    end
    check(exp_q[0].size() == 11, "reference: acknowledgement PPDU is 11 octets");
  end

  // Producer: all frames back to back.
  initial begin
    bit taken;
    taken = 0;
    wait (rst_n);
    for (int f = 0; f < FRAMES; f++) begin
      automatic int i = 0;
      while (i < in_q[f].size()) begin
        @(negedge clk);
        if (taken) begin in_valid = 0; taken = 0; end
        if (!in_valid && !(stalls && $urandom_range(0, 3) == 0)) begin
          in_data = in_q[f][i]; in_crc = (i >= SHR_PHR_OCTETS);
          in_last = (i == in_q[f].size() - 1); in_valid = 1;
        end
        #1;
        if (in_valid && in_ready) begin i++; taken = 1; end
      end
    end
    @(negedge clk); in_valid = 0;
  end

  initial begin
    int f, k;
    f = 0; k = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (f < FRAMES) begin
      @(negedge clk);
      stalls = (f % 2 == 1);
      out_ready = stalls ? ($urandom_range(0, 2) != 0) : 1'b1;
      #1;
      if (out_valid && out_ready) begin
        check(out_data == exp_q[f][k] && out_last == (k == exp_q[f].size() - 1),
              $sformatf("frame %0d octet %0d: got %h last %0b expected %h", f, k,
                        out_data, out_last, exp_q[f][k]));
        k++;
        if (k == exp_q[f].size()) begin
          automatic byteq_t mac = exp_q[f][SHR_PHR_OCTETS:$];
          check(crc_div(lsb_first(mac), GEN_CRC16) == 16'h0000,
                $sformatf("frame %0d: receiver remainder is zero", f));
          f++; k = 0;
        end
      end
    end
    @(negedge clk); @(negedge clk);
    check(!busy && !out_valid, "idle after the last frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
