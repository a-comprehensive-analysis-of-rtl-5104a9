// tb_symbol_to_chip: sends all sixteen symbols and then random ones, with a
// chip strobe every TICK clocks. Each symbol must leave as its 32-chip
// sequence (checked against the sequences written out in full in the
// reference package), chips of one burst exactly TICK clocks apart with no
// gap between symbols, index parity on chip_odd_o and chip_last_o only on
// chip 31 of a symbol sent with in_last.
module tb_symbol_to_chip;
  import zigbee_ref_pkg::*;

  localparam int TICK = 4;

  logic clk = 0, rst_n = 0, chip_tick;
  logic [3:0] in_sym = 0;
  logic in_last = 0, in_valid = 0, in_ready;
  logic chip_o, chip_stb_o, chip_odd_o, chip_last_o, busy;
  int checks = 0, failures = 0;

  symbol_to_chip dut (.*);

  always #5 clk = ~clk;

  int div = 0;
  always @(posedge clk) div <= (div == TICK - 1) ? 0 : div + 1;
  assign chip_tick = (div == TICK - 1);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 60;
  int syms[$];
  bit lasts[$];
  int sent = 0;
  bit taken = 0;

  // Producer: symbols 0..15 back to back, then random symbols with pauses.
  initial begin
    wait (rst_n);
    while (sent < N) begin
      @(negedge clk);
      if (taken) begin in_valid = 0; taken = 0; end
      // now and then hold the next symbol back long enough to starve the
      // chip stage
      if (!in_valid && sent >= 16 && $urandom_range(0, 9) == 0) repeat (40 * TICK) @(negedge clk);
      if (!in_valid) begin
        in_sym   = (sent < 16) ? 4'(sent) : 4'($urandom);
        in_last  = (sent % 7 == 6);
        in_valid = 1;
      end
      #1;
      if (in_valid && in_ready) begin
        syms.push_back(int'(in_sym)); lasts.push_back(in_last);
        sent++; taken = 1;
      end
    end
    @(negedge clk); in_valid = 0;
  end

  // Monitor
  int k = 0, sym_cnt = 0, last_stb = -1, cyc = 0, gaps_seen = 0;
  always @(negedge clk) begin
    cyc++;
    if (rst_n && chip_stb_o) begin
      checks++;
      if (syms.size() == 0) begin
        failures++; $display("FAIL chip with no symbol sent");
      end else begin
        if (chip_o !== chip_ref(syms[0], k) || chip_odd_o !== k[0] ||
            chip_last_o !== (lasts[0] && k == 31)) begin
          failures++;
          $display("FAIL symbol %0d (%0d) chip %0d: got %0b odd %0b last %0b",
                   sym_cnt, syms[0], k, chip_o, chip_odd_o, chip_last_o);
        end
        // spacing inside a burst
        if (last_stb >= 0 && cyc - last_stb != TICK) begin
          if (sym_cnt < 16 || k != 0) begin
            failures++; $display("FAIL chip spacing %0d at symbol %0d chip %0d", cyc - last_stb, sym_cnt, k);
          end else gaps_seen++;
        end
        last_stb = cyc;
        k++;
        if (k == 32) begin
          k = 0; sym_cnt++;
          void'(syms.pop_front()); void'(lasts.pop_front());
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (sym_cnt == N);
    repeat (2 * TICK) @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after the last symbol"); end
    checks++;
    if (gaps_seen == 0) begin failures++; $display("FAIL the idle case never happened"); end
    $display("symbols %0d, idle gaps %0d", sym_cnt, gaps_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
