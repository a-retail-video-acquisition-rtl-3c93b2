// tb_board_interface -- checks the parallel-port interface.
//
// For random bus bytes it checks the byte the host sees: bits 0, 1, 3 and 7
// inverted, bits 2, 4, 5 and 6 unchanged, written out bit by bit here rather
// than with a mask. It checks that bACK passes through unchanged and that
// cACK (Dor bit 2), Start Capture (bit 6) and Reset (bit 7) reach the board
// exactly one system clock after the host changes them.
`timescale 1ns/1ps
module tb_board_interface;
  logic clk = 1'b0;
  logic [7:0] pc_dor = '0, pc_data, bus = '0;
  logic pc_back, back = 1'b0, cack, capimage, reset;
  int checks = 0, failures = 0;

  board_interface dut (.clk, .pc_dor, .pc_data, .pc_back, .bus, .back,
                       .cack, .capimage, .reset);

  always #100 clk = ~clk;

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] want, prev_dor;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      bus  = 8'($urandom);
      back = 1'($urandom);
      prev_dor = pc_dor;
      pc_dor = 8'($urandom);
      #1;
      want = {~bus[7], bus[6], bus[5], bus[4], ~bus[3], bus[2], ~bus[1], ~bus[0]};
      checks++;
      if (pc_data !== want || pc_back !== back) begin
        failures++;
        if (failures < 10) $display("bus %h back %b: port %h/%b, want %h", bus, back, pc_data, pc_back, want);
      end
      // Before the edge the board still sees the previous host byte.
      checks++;
      if (i > 0 && {reset, capimage, cack} !== {prev_dor[7], prev_dor[6], prev_dor[2]}) begin
        failures++;
        $display("host controls changed before the clock edge");
      end
      @(posedge clk); #1;
      checks++;
      if ({reset, capimage, cack} !== {pc_dor[7], pc_dor[6], pc_dor[2]}) begin
        failures++;
        if (failures < 10) $display("dor %b: reset %b capimage %b cack %b", pc_dor, reset, capimage, cack);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
