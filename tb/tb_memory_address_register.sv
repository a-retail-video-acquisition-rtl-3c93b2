// tb_memory_address_register -- checks the 15-bit address counter.
//
// Counts through the whole 32K range (so the low part carries into the high
// part and the counter wraps), with random pauses and clears, and compares
// the address with a plain integer model every cycle. The carry output is
// checked against its definition (count enable with the low seven bits all
// ones).
`timescale 1ns/1ps
module tb_memory_address_register;
  logic clk = 1'b0;
  logic clear = 1'b0, cnt = 1'b0;
  logic [14:0] addr;
  logic carry;
  int checks = 0, failures = 0, n_carry = 0;
  int unsigned model;

  memory_address_register dut (.clk, .clear, .cnt, .addr, .carry);

  always #100 clk = ~clk;

  initial begin : watchdog
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b1;
    @(negedge clk);
    model = 0;
    for (int i = 0; i < 80000; i++) begin
      clear = (i > 70000) && ($urandom_range(0, 999) == 0);
      cnt   = (i < 40000) ? 1'b1 : ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (carry !== (cnt && (model % 128) == 127)) begin
        failures++;
        $display("carry wrong at address %0d", model);
      end
      n_carry += int'(carry);
      @(negedge clk);
      if (clear)    model = 0;
      else if (cnt) model = (model + 1) % 32768;
      checks++;
      if (addr !== 15'(model)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: addr %0d, want %0d", i, addr, model);
      end
    end
    checks++;
    if (n_carry < 256) begin
      failures++;
      $display("too few carries: %0d", n_carry);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
