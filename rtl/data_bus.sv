// data_bus -- the board's shared 8-bit data bus.
//
// Three sources can drive the bus: the flash A/D converter through its
// tristate buffer (enabled by ADOE; the converter itself always drives, so
// the buffer is what keeps it off the bus), and the two SRAMs of the field
// buffer. The bus feeds the SRAM data inputs and the host interface. The
// tristate bus becomes a multiplexer here; when nothing drives it the bus
// reads as zero, a choice of this design (on the board it floats).
//
// Interface: adc_data/adoe from the converter side, sram_q/sram_valid from
// the field buffer; bus out. Purely combinational. An assertion flags two
// drivers at once, which on the board would be bus contention.
module data_bus #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic [DATA_W-1:0] adc_data,
  input  logic              adoe,
  input  logic [DATA_W-1:0] sram_q,
  input  logic              sram_valid,
  output logic [DATA_W-1:0] bus
);

  always_comb begin
    if (adoe)            bus = adc_data;
    else if (sram_valid) bus = sram_q;
    else                 bus = '0;
  end

  a_no_contention: assert property (@(posedge clk) !(adoe && sram_valid));

endmodule
