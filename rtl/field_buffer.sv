// field_buffer -- 64 KB frame store made of two 32K x 8 static RAMs.
//
// A 256 x 240 field needs 61,440 bytes. Two 32 KB SRAMs share the 15-bit
// address from the memory address register and the 8-bit data bus; SRAM A
// holds the even pixel of every horizontal pair and SRAM B the odd one. The
// controller picks the chip with separate output and write enables, so the
// pair acts as one 64 KB memory whose sixteenth address bit is the choice of
// enable, and a single address counter serves both.
//
// Timing: on the board the chip selects are tied to the system clock, so the
// SRAMs are active only in the second half of each cycle and a write takes
// the bus value of that half. Here a write happens at the clock edge that
// ends a cycle with the write enable high, which stores the same value. Reads
// are asynchronous: q shows the enabled chip's word at addr, and q_valid
// tells the bus that an SRAM is driving. If both output enables are high,
// SRAM A wins (the controller never does this). The RAMs are not cleared.
module field_buffer #(
  parameter int unsigned ADDR_W = 15,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] d,
  input  logic              we_a,
  input  logic              we_b,
  input  logic              oe_a,
  input  logic              oe_b,
  output logic [DATA_W-1:0] q,
  output logic              q_valid
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] sram_a [DEPTH];
  logic [DATA_W-1:0] sram_b [DEPTH];

  always_ff @(posedge clk)
    if (we_a) sram_a[addr] <= d;

  always_ff @(posedge clk)
    if (we_b) sram_b[addr] <= d;

  always_comb begin
    if (oe_a)      q = sram_a[addr];
    else if (oe_b) q = sram_b[addr];
    else           q = '0;
  end

  assign q_valid = oe_a || oe_b;

endmodule
