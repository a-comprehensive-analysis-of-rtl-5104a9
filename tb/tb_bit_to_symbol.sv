// tb_bit_to_symbol: random octets in with random valid gaps, random ready
// on the symbol side. Every octet must come out as its low nibble then its
// high nibble, the last flag only on the high nibble of the last octet, and
// an unstalled stream must carry one symbol per clock. The testbench drives
// at the falling edge and samples the handshakes just before the rising one.
module tb_bit_to_symbol;
  logic clk = 0, rst_n = 0;
  logic [7:0] in_data = 0;
  logic in_last = 0, in_valid = 0, in_ready;
  logic [3:0] out_sym;
  logic out_last, out_valid, out_ready = 0, busy;
  int checks = 0, failures = 0;

  bit_to_symbol dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 400;
  logic [4:0] exp_q[$];     // {last, symbol}
  int sent = 0, got = 0;
  bit taken = 0;

  task automatic check_out();
    logic [4:0] e;
    checks++;
    e = exp_q.pop_front();
    if ({out_last, out_sym} !== e) begin
      failures++;
      $display("FAIL symbol %0d: got last=%0b sym=%h expected last=%0b sym=%h",
               got, out_last, out_sym, e[4], e[3:0]);
    end
    got++;
  endtask

  // One clock of traffic: drive at the falling edge, settle, record the
  // handshakes that the next rising edge performs.
  task automatic cycle(input bit gaps, input int n_octets);
    @(negedge clk);
    if (taken) begin in_valid = 0; taken = 0; end
    out_ready = gaps ? ($urandom_range(0, 2) != 0) : 1'b1;
    if (!in_valid && sent < n_octets && !(gaps && $urandom_range(0, 3) == 0)) begin
      in_data  = 8'($urandom);
      in_last  = (sent % 11 == 10);
      in_valid = 1;
    end
    #1;
    if (out_valid && out_ready) check_out();
    if (in_valid && in_ready) begin
      exp_q.push_back({1'b0, in_data[3:0]});
      exp_q.push_back({in_last, in_data[7:4]});
      sent++;
      taken = 1;
    end
  endtask

  initial begin
    int t0, c;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (got < 2 * N) cycle(1, N);
    @(negedge clk);
    checks++;
    if (busy || out_valid) begin failures++; $display("FAIL busy after the stream"); end

    // Throughput: octets back to back, ready always high.
    t0 = got; c = 0;
    while (got < t0 + 32) begin cycle(0, N + 16); c++; end
    checks++;
    if (c > 33) begin failures++; $display("FAIL throughput: 32 symbols took %0d clocks", c); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
