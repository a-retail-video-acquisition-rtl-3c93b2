// tb_field_buffer -- checks the two-SRAM field buffer.
//
// Fills both SRAMs with different patterns at every address using the two
// write enables, including pairs written back to back at one address as the
// capture loop does, then reads everything back through each output enable
// and checks that each chip kept its own data, that q_valid follows the
// enables and that q is zero when neither chip is enabled.
`timescale 1ns/1ps
module tb_field_buffer;
  logic clk = 1'b0;
  logic [14:0] addr = '0;
  logic [7:0]  d = '0, q;
  logic we_a = 1'b0, we_b = 1'b0, oe_a = 1'b0, oe_b = 1'b0, q_valid;
  int checks = 0, failures = 0;

  field_buffer dut (.clk, .addr, .d, .we_a, .we_b, .oe_a, .oe_b, .q, .q_valid);

  always #100 clk = ~clk;

  initial begin : watchdog
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pat(input int a, input bit b);
    return b ? 8'((a * 7 + 3) ^ (a >> 8)) : 8'((a * 13 + 91) ^ (a >> 7));
  endfunction

  initial begin
    @(negedge clk);
    for (int a = 0; a < 32768; a++) begin
      addr = 15'(a);
      d = pat(a, 0); we_a = 1'b1; we_b = 1'b0;
      @(negedge clk);
      d = pat(a, 1); we_a = 1'b0; we_b = 1'b1;
      @(negedge clk);
    end
    we_b = 1'b0;
    for (int a = 0; a < 32768; a++) begin
      addr = 15'(a);
      oe_a = 1'b1; oe_b = 1'b0; #1;
      checks++;
      if (q !== pat(a, 0) || !q_valid) begin
        failures++;
        if (failures < 10) $display("A[%0d] = %h, want %h", a, q, pat(a, 0));
      end
      oe_a = 1'b0; oe_b = 1'b1; #1;
      checks++;
      if (q !== pat(a, 1) || !q_valid) begin
        failures++;
        if (failures < 10) $display("B[%0d] = %h, want %h", a, q, pat(a, 1));
      end
      oe_b = 1'b0; #1;
      checks++;
      if (q !== 8'h00 || q_valid) begin
        failures++;
        $display("bus driven with no output enable at %0d", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
