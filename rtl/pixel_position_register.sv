// pixel_position_register -- counts the samples taken on the current line.
//
// The controller stores or sends pixels in pairs (one to SRAM A, one to
// SRAM B at the same address), and it pulses CNTCNT once per pair. The
// register therefore counts pairs: with PAIRS = 128 it is a 7-bit counter,
// and EQ256 is high while the count holds PAIRS-1, i.e. while the last pair
// of a 256-pixel line is being handled. The end-of-data flag from the sync
// logic cannot be used for this, as it may arrive several samples late.
//
// Timing: synchronous; CNTCLEAR wins over CNTCNT; eq256 is combinational from
// the count. The counting and the all-ones compare follow the original PAL;
// the pair count is a parameter here.
// The count starts at zero at power-up; there is no other reset.
module pixel_position_register #(
  parameter int unsigned PAIRS = 128,
  localparam int unsigned W    = (PAIRS > 1) ? $clog2(PAIRS) : 1
) (
  input  logic         clk,
  input  logic         cntclear,
  input  logic         cntcnt,
  output logic         eq256,
  output logic [W-1:0] count = '0
);

  always_ff @(posedge clk) begin
    if (cntclear)    count <= '0;
    else if (cntcnt) count <= count + 1'b1;
  end

  assign eq256 = (count == W'(PAIRS - 1));

endmodule
