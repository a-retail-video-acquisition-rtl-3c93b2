// tb_line_position_register -- checks the line counter and PAGEEND.
//
// Counts lines with random gaps and checks that PAGEEND is low for counts
// 0 to 239 and high from 240 on, that further counts keep it high, and that
// a clear (winning over a simultaneous count) restarts the field.
`timescale 1ns/1ps
module tb_line_position_register;
  logic clk = 1'b0;
  logic pageclear = 1'b0, pagecnt = 1'b0;
  logic pageend;
  logic [7:0] count;
  int checks = 0, failures = 0, n_end = 0;

  line_position_register dut (.clk, .pageclear, .pagecnt, .pageend, .count);

  always #100 clk = ~clk;

  initial begin : watchdog
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int field = 0; field < 4; field++) begin
      pageclear = 1'b1; pagecnt = 1'b1;
      @(negedge clk);
      pageclear = 1'b0;
      for (int n = 0; n < 245; n++) begin
        checks++;
        if (pageend !== (n >= 240) || count !== 8'(n)) begin
          failures++;
          $display("field %0d after %0d lines: pageend %b count %0d", field, n, pageend, count);
        end
        if (n == 240) n_end++;
        pagecnt = 1'b0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        pagecnt = 1'b1;
        @(negedge clk);
      end
      pagecnt = 1'b0;
    end
    checks++;
    if (n_end != 4) begin failures++; $display("end of page reached %0d times", n_end); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
