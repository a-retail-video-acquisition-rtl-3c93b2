// tb_video_capture_board_full -- one complete capture and transfer of a
// 256 x 240 field with the board at its default parameters and NTSC-like
// line timing (320 system clocks per 64 us line, 262 lines per field,
// VSYNC for 9 lines). The host model (vcb_harness) checks every pixel and
// the handshake response times, and also runs one Reset.
`timescale 1ns/1ps
module tb_video_capture_board_full;
  import vcb_pkg::*;

  logic clk_10mhz, sysclk, sampclk, hdrive, vsync, pc_back, eod, eof;
  logic [7:0] adc_data, pc_dor, pc_data;
  ctrl_state_e state;

  video_capture_board dut (.*);

  vcb_harness #(
    .PIX (256), .LINES (240), .LINE_CYC (320), .HPW (24),
    .FIELD_LINES (262), .VS_LINES (9), .CAPTURES (1), .ABORTS (1'b0),
    .MAX_DELAY (2), .WATCHDOG (2_000_000)
  ) harness (.*);
endmodule
