// tb_oqpsk_mod: feeds random chips, one every TICK clocks, with alternating
// index parity. Even chips must appear on the I rail and odd chips on the Q
// rail one clock after their strobe, each rail must hold its value for two
// chip periods, the Q rail must change exactly one chip period after the I
// rail, and q_last must follow a last odd chip.
module tb_oqpsk_mod;
  localparam int TICK = 4;

  logic clk = 0, rst_n = 0;
  logic chip_i = 0, chip_stb_i = 0, chip_odd_i = 0, chip_last_i = 0;
  logic i_bit, q_bit, i_start, q_start, q_last;
  int checks = 0, failures = 0;

  oqpsk_mod dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bit c, odd, last, exp_i, exp_q;
    int last_i_start, last_q_start, cyc;
    last_i_start = -1; last_q_start = -1; cyc = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 640; n++) begin
      c = 1'($urandom); odd = n[0]; last = (n % 64 == 63);
      @(negedge clk);
      chip_i = c; chip_stb_i = 1; chip_odd_i = odd; chip_last_i = last;
      for (int t = 0; t < TICK; t++) begin
        @(negedge clk); cyc++;
        chip_stb_i = 0; chip_last_i = 0;
        if (!odd) exp_i = c; else exp_q = c;
        if (n >= 1) check(i_bit == exp_i && q_bit == exp_q,
                          $sformatf("rails hold their values, chip %0d clock %0d", n, t));
        if (t == 0) begin
          check(i_start == !odd && q_start == odd, $sformatf("start strobes at chip %0d", n));
          check(q_last == (odd && last), $sformatf("q_last at chip %0d", n));
          if (!odd) begin
            check(i_bit == c, $sformatf("I rail value at chip %0d", n));
            if (last_i_start >= 0) check(cyc - last_i_start == 2 * TICK, "I rail period");
            last_i_start = cyc;
          end else begin
            check(q_bit == c, $sformatf("Q rail value at chip %0d", n));
            check(cyc - last_i_start == TICK, "Q offset of one chip after I");
            if (last_q_start >= 0) check(cyc - last_q_start == 2 * TICK, "Q rail period");
            last_q_start = cyc;
          end
        end else begin
          check(!i_start && !q_start && !q_last, "no strobe between chips");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
