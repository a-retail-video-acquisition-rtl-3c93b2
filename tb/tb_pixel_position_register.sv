// tb_pixel_position_register -- checks the pixel-pair counter and EQ256.
//
// Counts pairs along a simulated line with random idle cycles and checks
// that EQ256 is high exactly while the 128th pair (pixels 255 and 256) is
// counted, that it stays off for the other 127, and that a clear returns the
// count to zero even with the count input high.
`timescale 1ns/1ps
module tb_pixel_position_register;
  logic clk = 1'b0;
  logic cntclear = 1'b0, cntcnt = 1'b0;
  logic eq256;
  logic [6:0] count;
  int checks = 0, failures = 0, n_eq = 0;
  int model;

  pixel_position_register dut (.clk, .cntclear, .cntcnt, .eq256, .count);

  always #100 clk = ~clk;

  initial begin : watchdog
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cntclear = 1'b1;
    @(negedge clk);
    model = 0;
    for (int line = 0; line < 20; line++) begin
      // Clear with count high: clear must win.
      cntclear = 1'b1; cntcnt = 1'b1;
      @(negedge clk);
      model = 0;
      cntclear = 1'b0;
      for (int pair = 0; pair < 128; pair++) begin
        cntcnt = 1'b0;
        repeat ($urandom_range(0, 2)) begin
          @(negedge clk);
          checks++;
          if (eq256 !== (pair == 127)) begin failures++; $display("eq256 wrong idle pair %0d", pair); end
        end
        checks++;
        if (eq256 !== (pair == 127) || count !== 7'(pair)) begin
          failures++;
          $display("line %0d pair %0d: eq256 %b count %0d", line, pair, eq256, count);
        end
        n_eq += int'(eq256);
        cntcnt = 1'b1;
        @(negedge clk);
      end
    end
    checks++;
    if (n_eq != 20) begin failures++; $display("eq256 seen %0d times, want 20", n_eq); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
