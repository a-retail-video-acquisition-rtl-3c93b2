// board_interface -- connection between the board and a PC parallel port.
//
// The PC port offers one 8-bit output register (Dor) and, spread over two
// 5-bit status registers, eight input lines. Four of those input lines
// (D0, D1, D3 and D7) are defined active low, so the interface inverts those
// bits of the board's data bus before driving them, and the host software
// reads back the true byte. The acknowledge bACK goes out through two
// inverters, i.e. unchanged. From Dor the board uses three bits: D2 = cACK
// (host acknowledge), D6 = Start Capture and D7 = Reset. These come from
// another clock domain and are registered once on the system clock before
// they reach the controller.
//
// Interface: pc_dor is the host's output register as seen on the cable;
// pc_data and pc_back go to the host. Timing: pc_data and pc_back follow the
// bus and bACK combinationally; cack, capimage and reset are one system clock
// behind pc_dor. Bit assignments and inversions follow the board; using a
// single register stage for the host signals is this design's choice. The
// registers start at zero.
module board_interface
  import vcb_pkg::*;
(
  input  logic       clk,
  // host side
  input  logic [7:0] pc_dor,
  output logic [7:0] pc_data,
  output logic       pc_back,
  // board side
  input  logic [7:0] bus,
  input  logic       back,
  output logic       cack     = 1'b0,
  output logic       capimage = 1'b0,
  output logic       reset    = 1'b0
);

  assign pc_data = bus ^ PORT_INVERT_MASK;
  assign pc_back = back;

  always_ff @(posedge clk) begin
    cack     <= pc_dor[DOR_CACK];
    capimage <= pc_dor[DOR_CAPTURE];
    reset    <= pc_dor[DOR_RESET];
  end

endmodule
