// tb_half_sine_shaper: runs the shaper at its default 4 samples per chip and
// 8-bit samples. Rail values start back to back every 2*SPC clocks, then a
// pause. Each sample must be +/- round(127 * sin(pi*k/(2*SPC))) for the
// sign of its rail bit, computed here with real arithmetic; the output must
// be 0 and active low once the last pulse has run out.
module tb_half_sine_shaper;
  import zigbee_ref_pkg::*;

  localparam int SPC = 4;
  localparam int AMP = 127;

  logic clk = 0, rst_n = 0, start = 0, bit_i = 0;
  logic signed [7:0] sample;
  logic active;
  int checks = 0, failures = 0;

  half_sine_shaper dut (.*);

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
    bit b;
    int e;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    check(sample == 0 && !active, "idle after reset");
    for (int burst = 0; burst < 20; burst++) begin
      automatic int len = 1 + $urandom_range(0, 12);
      for (int p = 0; p < len; p++) begin
        b = 1'($urandom);
        start = 1; bit_i = b;
        @(negedge clk);
        start = 0; bit_i = 1'($urandom);   // the rail may change meanwhile
        for (int k = 0; k < 2 * SPC; k++) begin
          e = half_sine(k, SPC, AMP);
          if (!b) e = -e;
          check(int'(sample) == e && active,
                $sformatf("burst %0d pulse %0d sample %0d: got %0d expected %0d", burst, p, k, sample, e));
          if (k < 2 * SPC - 1) @(negedge clk);
        end
      end
      @(negedge clk);
      repeat (5) begin
        check(sample == 0 && !active, "idle between bursts");
        @(negedge clk);
      end
    end
    check(half_sine(SPC, SPC, AMP) == AMP, "peak sample reaches full amplitude");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
