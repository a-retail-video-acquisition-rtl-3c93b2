// clock_gen -- 5 MHz system and sample clocks from a 10 MHz oscillator.
//
// A four-bit counter (a 74LS163 on the board) divides the oscillator by two
// on its least significant bit. One inverter turns that bit into the system
// clock; two inverters in series give the A/D sample clock, which is
// therefore the system clock inverted: the converter latches a new sample
// half a period after each system clock edge, so it is stable while the
// SRAMs write in the second half of the system clock cycle.
//
// Interface: clk_10mhz in; sysclk and sampclk out, both 5 MHz, opposite in
// phase. The divide-by-two and the inverter chains follow the board; the
// counter has no reset, as its clear input is tied inactive, so the phase of
// the divided clock after power-up is arbitrary.
module clock_gen (
  input  logic clk_10mhz,
  output logic sysclk,
  output logic sampclk
);

  logic q0;  // least significant counter bit

  always_ff @(posedge clk_10mhz)
    q0 <= ~q0;

  assign sysclk  = ~q0;  // one inverter
  assign sampclk = q0;   // two inverters

endmodule
