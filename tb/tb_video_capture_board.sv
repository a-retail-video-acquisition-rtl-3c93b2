// tb_video_capture_board -- end-to-end test of the board at a reduced size.
//
// A 16 x 6 pixel picture from short video lines keeps the run short while
// exercising everything: a capture started mid-field, the line store loop,
// the end-of-field switch to transmission, the handshake with a host that
// answers late, a Reset during capture and one during transmission, and two
// complete fields received and checked pixel by pixel (see vcb_harness).
`timescale 1ns/1ps
module tb_video_capture_board;
  import vcb_pkg::*;
  localparam int unsigned PIX = 16, LINES = 6;

  logic clk_10mhz, sysclk, sampclk, hdrive, vsync, pc_back, eod, eof;
  logic [7:0] adc_data, pc_dor, pc_data;
  ctrl_state_e state;

  video_capture_board #(
    .PIXELS_PER_LINE (PIX),
    .LINES_PER_FIELD (LINES),
    .ADDR_W          (6)
  ) dut (.*);

  vcb_harness #(
    .PIX (PIX), .LINES (LINES), .LINE_CYC (48), .HPW (6),
    .FIELD_LINES (14), .VS_LINES (3), .CAPTURES (2), .ABORTS (1'b1),
    .MAX_DELAY (3), .WATCHDOG (200000)
  ) harness (.*);
endmodule
