// tb_data_bus -- checks the shared data bus multiplexer.
//
// With random values on both sources, the bus must carry the converter's
// sample when ADOE is high, the SRAM word when an SRAM drives, and zero when
// nobody drives. The two drivers are never enabled together (the design
// asserts this).
`timescale 1ns/1ps
module tb_data_bus;
  logic clk = 1'b0;
  logic [7:0] adc_data, sram_q, bus;
  logic adoe, sram_valid;
  int checks = 0, failures = 0;

  data_bus dut (.clk, .adc_data, .adoe, .sram_q, .sram_valid, .bus);

  always #100 clk = ~clk;

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] want;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      adc_data = 8'($urandom);
      sram_q   = 8'($urandom);
      case (i % 3)
        0: begin adoe = 1'b1; sram_valid = 1'b0; want = adc_data; end
        1: begin adoe = 1'b0; sram_valid = 1'b1; want = sram_q;   end
        default: begin adoe = 1'b0; sram_valid = 1'b0; want = 8'h00; end
      endcase
      #1;
      checks++;
      if (bus !== want) begin
        failures++;
        if (failures < 10) $display("adoe %b sram %b: bus %h, want %h", adoe, sram_valid, bus, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
