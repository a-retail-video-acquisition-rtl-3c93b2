// tb_clock_gen -- checks the divide-by-two clock generator.
//
// Drives a 10 MHz clock and checks on every input edge that the system clock
// toggles once per oscillator period, that it runs at half the input rate,
// and that the sample clock is always the system clock inverted.
`timescale 1ns/1ps
module tb_clock_gen;
  logic clk_10mhz = 1'b0;
  logic sysclk, sampclk;
  int   checks = 0, failures = 0;

  clock_gen dut (.clk_10mhz(clk_10mhz), .sysclk(sysclk), .sampclk(sampclk));

  always #50 clk_10mhz = ~clk_10mhz;

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    int   sys_rises;
    realtime t_first, t_last;
    sys_rises = 0;
    @(posedge clk_10mhz); #1;
    prev = sysclk;
    repeat (200) begin
      @(posedge clk_10mhz); #1;
      checks++;
      if (sysclk === prev) begin
        failures++;
        $display("sysclk did not toggle at %0t", $realtime);
      end
      checks++;
      if (sampclk !== ~sysclk) begin
        failures++;
        $display("sampclk is not the inverse of sysclk at %0t", $realtime);
      end
      if (sysclk && !prev) begin
        if (sys_rises == 0) t_first = $realtime;
        t_last = $realtime;
        sys_rises++;
      end
      prev = sysclk;
    end
    // 200 input periods give 100 system clock periods of 200 ns (5 MHz).
    checks++;
    if (sys_rises != 100 || (t_last - t_first) != 99 * 200.0) begin
      failures++;
      $display("sysclk rate wrong: %0d rises over %0t", sys_rises, t_last - t_first);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
