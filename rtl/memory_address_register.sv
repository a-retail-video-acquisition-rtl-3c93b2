// memory_address_register -- sequential address counter for the field
// buffer.
//
// The field buffer is always walked in order, so the address register only
// clears to zero (MARCLEAR) and counts up by one (MARCNT). It is split as on
// the board, where it filled two PALs: a LO_W-bit low part that produces a
// carry when it counts past all ones, and a HI_W-bit high part that counts
// on that carry. With the defaults (7 + 8 bits) it spans the 15 address bits
// shared by both SRAMs; 240 lines x 128 pixel pairs use 30,720 of the 32,768
// locations.
//
// Timing: synchronous to clk; clear wins over count; the new address appears
// after the clock edge at which clear or count is sampled high. The carry is
// combinational from the low part and the count input, as in the original.
// The count starts at zero at power-up; there is no other reset.
module memory_address_register #(
  parameter int unsigned LO_W = 7,
  parameter int unsigned HI_W = 8
) (
  input  logic                 clk,
  input  logic                 clear,
  input  logic                 cnt,
  output logic [HI_W+LO_W-1:0] addr,
  output logic                 carry
);

  logic [LO_W-1:0] lo = '0;
  logic [HI_W-1:0] hi = '0;

  assign carry = cnt && (&lo);
  assign addr  = {hi, lo};

  // Low part.
  always_ff @(posedge clk) begin
    if (clear)    lo <= '0;
    else if (cnt) lo <= lo + 1'b1;
  end

  // High part, counting on the carry of the low part.
  always_ff @(posedge clk) begin
    if (clear)      hi <= '0;
    else if (carry) hi <= hi + 1'b1;
  end

endmodule
