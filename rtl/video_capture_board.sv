// video_capture_board -- single-field NTSC frame grabber with a parallel-port
// host interface.
//
// The board grabs one video field as 256 x 240 eight-bit grey pixels into an
// on-board field buffer and then hands it to a host computer byte by byte
// with a ready/acknowledge handshake. Everything runs on one 5 MHz system
// clock, divided from a 10 MHz oscillator; the same rate is the A/D sampling
// rate, so one sample is taken and stored per cycle.
//
//   hdrive/vsync --> videoflag --SOF/SOD--> control_fsm <-- board_interface
//   adc_data --> data_bus --> field_buffer (SRAM A/B)         ^   |
//                   |  ^          ^ addr                       |   v
//                   |  +-- q -----+ memory_address_register   host port
//                   +--> board_interface --> host
//   pixel_position_register (EQ256) and line_position_register (PAGEEND)
//   tell the controller where it is in the line and in the field.
//
// The sync separator and the flash A/D converter are analog parts and stay
// outside: their digital signals are ports. sampclk is the clock for the
// converter (the system clock inverted); adc_data is expected to change
// shortly after each rising sysclk edge and be stable by the next one.
//
// Host protocol (see control_fsm for the states): set Dor bit 6 to start a
// capture; after the field is stored the board presents a byte and raises
// bACK; the host reads pc_data (bits 0, 1, 3, 7 inverted), raises cACK (Dor
// bit 2), waits for bACK to fall and lowers cACK. Pixels come out in raster
// order, left to right and top to bottom. Dor bit 7 resets the board to idle.
//
// Parameters: PIXELS_PER_LINE (even) and LINES_PER_FIELD default to the
// board's 256 and 240; ADDR_W must hold LINES_PER_FIELD * PIXELS_PER_LINE / 2
// locations. Smaller values are meant for short simulations.
module video_capture_board #(
  parameter int unsigned PIXELS_PER_LINE = vcb_pkg::PIXELS_PER_LINE,
  parameter int unsigned LINES_PER_FIELD = vcb_pkg::LINES_PER_FIELD,
  parameter int unsigned ADDR_W          = vcb_pkg::ADDR_W
) (
  input  logic        clk_10mhz,
  output logic        sysclk,
  output logic        sampclk,
  // sync separator
  input  logic        hdrive,
  input  logic        vsync,
  // flash A/D converter
  input  logic [7:0]  adc_data,
  // host parallel port
  input  logic [7:0]  pc_dor,
  output logic [7:0]  pc_data,
  output logic        pc_back,
  // observation
  output logic        eod,
  output logic        eof,
  output vcb_pkg::ctrl_state_e state
);

  localparam int unsigned PAIRS = PIXELS_PER_LINE / 2;
  localparam int unsigned LO_W  = (ADDR_W > 7) ? 7 : ADDR_W - 1;
  localparam int unsigned HI_W  = ADDR_W - LO_W;

  logic              sod, sof;
  logic              cack, capimage, reset;
  logic              eq256, pageend, pagecnt;
  vcb_pkg::ctrl_cmd_t cmd;
  logic [ADDR_W-1:0] addr;
  logic              mar_carry;
  logic [7:0]        bus, sram_q;
  logic              sram_valid;

  clock_gen u_clock_gen (
    .clk_10mhz (clk_10mhz),
    .sysclk    (sysclk),
    .sampclk   (sampclk)
  );

  videoflag u_videoflag (
    .clk    (sysclk),
    .hdrive (hdrive),
    .vsync  (vsync),
    .sod    (sod),
    .sof    (sof),
    .eod    (eod),
    .eof    (eof),
    .state  ()
  );

  board_interface u_board_interface (
    .clk      (sysclk),
    .pc_dor   (pc_dor),
    .pc_data  (pc_data),
    .pc_back  (pc_back),
    .bus      (bus),
    .back     (cmd.back),
    .cack     (cack),
    .capimage (capimage),
    .reset    (reset)
  );

  control_fsm u_control_fsm (
    .clk      (sysclk),
    .reset    (reset),
    .capimage (capimage),
    .cack     (cack),
    .sof      (sof),
    .sod      (sod),
    .eq256    (eq256),
    .pageend  (pageend),
    .cmd      (cmd),
    .pagecnt  (pagecnt),
    .state    (state)
  );

  memory_address_register #(
    .LO_W (LO_W),
    .HI_W (HI_W)
  ) u_mar (
    .clk   (sysclk),
    .clear (cmd.marclear),
    .cnt   (cmd.marcnt),
    .addr  (addr),
    .carry (mar_carry)
  );

  pixel_position_register #(
    .PAIRS (PAIRS)
  ) u_pixel_position_register (
    .clk      (sysclk),
    .cntclear (cmd.cntclear),
    .cntcnt   (cmd.cntcnt),
    .eq256    (eq256),
    .count    ()
  );

  line_position_register #(
    .LINES (LINES_PER_FIELD)
  ) u_line_position_register (
    .clk       (sysclk),
    .pageclear (cmd.pageclear),
    .pagecnt   (pagecnt),
    .pageend   (pageend),
    .count     ()
  );

  field_buffer #(
    .ADDR_W (ADDR_W),
    .DATA_W (8)
  ) u_field_buffer (
    .clk     (sysclk),
    .addr    (addr),
    .d       (bus),
    .we_a    (cmd.sramawe),
    .we_b    (cmd.srambwe),
    .oe_a    (cmd.sramaoe),
    .oe_b    (cmd.sramboe),
    .q       (sram_q),
    .q_valid (sram_valid)
  );

  data_bus #(
    .DATA_W (8)
  ) u_data_bus (
    .clk        (sysclk),
    .adc_data   (adc_data),
    .adoe       (cmd.adoe),
    .sram_q     (sram_q),
    .sram_valid (sram_valid),
    .bus        (bus)
  );

  // The field must fit in the buffer.
  initial assert ((LINES_PER_FIELD * PAIRS) <= (1 << ADDR_W))
    else $error("field of %0d pixel pairs does not fit %0d addresses",
                LINES_PER_FIELD * PAIRS, 1 << ADDR_W);

endmodule
