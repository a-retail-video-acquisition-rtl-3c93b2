// line_position_register -- counts the lines stored in (or sent from) the
// field buffer.
//
// An NTSC field has about 262 lines, of which about 240 carry picture. The
// controller increments this counter (PAGECNT) at the end of every line and
// clears it (PAGECLEAR) at the start of a field and of the transmission.
// PAGEEND goes high once LINES lines have been counted; the end-of-field flag
// from the sync logic would come too late.
//
// Timing: synchronous; clear wins over count; pageend is combinational. With
// the default of 240 the compare reduces to the top four bits of the 8-bit
// count all being one, which is how the original PAL decodes it; the count
// stops at its maximum instead of wrapping, which is this design's choice.
// The count starts at zero at power-up; there is no other reset.
module line_position_register #(
  parameter int unsigned LINES = 240,
  localparam int unsigned W    = $clog2(LINES + 1)
) (
  input  logic         clk,
  input  logic         pageclear,
  input  logic         pagecnt,
  output logic         pageend,
  output logic [W-1:0] count = '0
);

  always_ff @(posedge clk) begin
    if (pageclear)                  count <= '0;
    else if (pagecnt && !(&count))  count <= count + 1'b1;
  end

  assign pageend = (count >= W'(LINES));

endmodule
