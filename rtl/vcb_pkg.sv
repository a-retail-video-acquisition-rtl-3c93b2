// vcb_pkg -- types and constants shared by the video capture board.
//
// The board captures one NTSC field as 256 x 240 eight-bit pixels and hands
// it to a host over a parallel port. The numbers below are the board's main
// configuration: 256 samples per line (5 MHz sampling of the 51.8 us active
// line), 240 stored lines per field and a 15-bit address into two 32 KB
// SRAMs that each hold one pixel of every horizontal pixel pair.
//
// The state encodings are the ones the original PAL equations use, so that a
// state number seen in simulation can be read against those equations. The
// three codes left over in the control FSM are "trap" states that fall back
// to IDLE on the next clock.
package vcb_pkg;

  localparam int unsigned PIXELS_PER_LINE = 256;
  localparam int unsigned LINES_PER_FIELD = 240;
  localparam int unsigned ADDR_W          = 15;
  localparam int unsigned DATA_W          = 8;

  // Videoflag sync-tracking FSM (two state bits, Q1:Q0).
  typedef enum logic [1:0] {
    VF_ACTIVE_DATA    = 2'b00,
    VF_BETWEEN_FIELDS = 2'b01,
    VF_BETWEEN_LINES  = 2'b10,
    VF_UNUSED         = 2'b11
  } vf_state_e;

  // Control FSM (four state bits, Q3..Q0).
  typedef enum logic [3:0] {
    CS_IDLE        = 4'd0,
    CS_SOFWAIT     = 4'd1,
    CS_SODWAIT     = 4'd2,
    CS_SRAMAWRITE  = 4'd3,
    CS_SRAMBWRITE  = 4'd4,
    CS_TRANSSTART  = 4'd5,
    CS_TRAN1       = 4'd6,
    CS_TRAN2       = 4'd7,
    CS_TRAN3       = 4'd8,
    CS_TRAN4       = 4'd9,
    CS_TRAN5       = 4'd10,
    CS_TRAN6       = 4'd11,
    CS_TRAN7       = 4'd12,
    CS_TRAP13      = 4'd13,
    CS_TRAP14      = 4'd14,
    CS_TRAP15      = 4'd15
  } ctrl_state_e;

  // Registered command outputs of the control FSM, all active high here.
  // On the board /ADOE and the four SRAM enables are active-low pins.
  typedef struct packed {
    logic adoe;       // A/D tristate buffer drives the data bus
    logic sramaoe;    // SRAM A drives the data bus
    logic sramboe;    // SRAM B drives the data bus
    logic sramawe;    // SRAM A writes the data bus
    logic srambwe;    // SRAM B writes the data bus
    logic marclear;   // clear memory address register
    logic marcnt;     // increment memory address register
    logic cntclear;   // clear pixel position register
    logic cntcnt;     // increment pixel position register
    logic pageclear;  // clear line position register
    logic back;       // board acknowledge to the host
  } ctrl_cmd_t;

  // Bits of the board-to-host byte that the port defines as active low and
  // that the interface therefore inverts (D7, D3, D1, D0).
  localparam logic [7:0] PORT_INVERT_MASK = 8'b1000_1011;

  // Bit positions of the host's output register (Dor) used by the board.
  localparam int unsigned DOR_CACK     = 2;
  localparam int unsigned DOR_CAPTURE  = 6;
  localparam int unsigned DOR_RESET    = 7;

endpackage
