// tb_crc16_lfsr: checks the bit-serial CRC-16 register against polynomial
// long division, against the published CRC-16 (poly 0x8005, zero initial
// value, no reflection) check value 0xFEE8 of the ASCII string "123456789",
// and checks that a message followed by its remainder leaves zero.
module tb_crc16_lfsr;
  import zigbee_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, en = 0, din = 0;
  logic [15:0] crc;
  int checks = 0, failures = 0;

  crc16_lfsr dut (.clk, .rst_n, .clear, .en, .din, .crc);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic shift_bits(input bitq_t q);
    foreach (q[i]) begin
      en <= 1; din <= q[i];
      @(posedge clk);
    end
    en <= 0; din <= 0;
    @(posedge clk);
  endtask

  task automatic do_clear();
    clear <= 1; @(posedge clk); clear <= 0; @(posedge clk);
  endtask

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    bitq_t msg;
    bit [15:0] r;
    string s;
    s = "123456789";
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(crc, 16'h0000, "reset value");

    // Known check value, octets sent most significant bit first.
    msg = {};
    for (int i = 0; i < s.len(); i++) for (int k = 7; k >= 0; k--) msg.push_back(s[i][k]);
    shift_bits(msg);
    check(crc, 16'hFEE8, "check value of 123456789");
    check(crc_div(msg, GEN_CRC16), 16'hFEE8, "reference model self-check");

    // Random messages against long division, then the zero-remainder check.
    for (int t = 0; t < 200; t++) begin
      int n;
      n = 1 + $urandom_range(0, 150);
      do_clear();
      msg = {};
      for (int i = 0; i < n; i++) msg.push_back(1'($urandom));
      shift_bits(msg);
      r = crc_div(msg, GEN_CRC16);
      check(crc, r, $sformatf("random message %0d", t));
      msg = {};
      for (int k = 15; k >= 0; k--) msg.push_back(r[k]);
      shift_bits(msg);
      check(crc, 16'h0000, "message plus remainder");
    end

    // en low holds the register; clear wins over en.
    do_clear();
    shift_bits('{1'b1, 1'b0, 1'b1});
    r = crc;
    repeat (5) @(posedge clk);
    check(crc, r, "hold while en low");
    clear <= 1; en <= 1; din <= 1; @(posedge clk);
    clear <= 0; en <= 0; @(posedge clk);
    check(crc, 16'h0000, "clear over en");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
