// tb_videoflag -- checks the sync-tracking FSM against its output equations.
//
// The reference below is written as sum-of-products equations over the two
// state bits (Q1 Q0) and the sync inputs, independent of the case statement
// in the design. Random HDRIVE/VSYNC sequences, biased towards long steady
// runs like real sync signals, are applied and every output and the state
// are compared every cycle. Each of the four flags must have fired.
`timescale 1ns/1ps
module tb_videoflag;
  import vcb_pkg::*;
  logic clk = 1'b0;
  logic hdrive = 1'b0, vsync = 1'b0;
  logic sod, sof, eod, eof;
  vf_state_e state;
  int checks = 0, failures = 0;
  int n_sod = 0, n_sof = 0, n_eod = 0, n_eof = 0;

  videoflag dut (.clk, .hdrive, .vsync, .sod, .sof, .eod, .eof, .state);

  always #100 clk = ~clk;

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic q0, q1, r_sod, r_sof, r_eod, r_eof;

  task automatic ref_step(input logic h, input logic v);
    logic n0, n1;
    n0    = (v & ~q1) | (v & ~q0);
    n1    = h & ~v & ~q0;
    r_eof = v & ~q0;
    r_eod = h & ~v & ~q0 & ~q1;
    r_sof = ~v & q0 & ~q1;
    r_sod = ~h & ~v & ~q0 & q1;
    q0 = n0;
    q1 = n1;
  endtask

  initial begin
    // Hold VSYNC: from any start state the machine reaches BETWEEN_FIELDS.
    vsync = 1'b1;
    repeat (3) @(negedge clk);
    q0 = 1'b1; q1 = 1'b0;
    for (int i = 0; i < 20000; i++) begin
      if ($urandom_range(0, 7) == 0) hdrive = ~hdrive;
      if ($urandom_range(0, 40) == 0) vsync = ~vsync;
      ref_step(hdrive, vsync);
      @(negedge clk);
      checks++;
      if ({sod, sof, eod, eof} !== {r_sod, r_sof, r_eod, r_eof} ||
          state !== vf_state_e'({q1, q0})) begin
        failures++;
        if (failures < 10)
          $display("cycle %0d: got sod%b sof%b eod%b eof%b st%0d, want %b%b%b%b st%0d",
                   i, sod, sof, eod, eof, state, r_sod, r_sof, r_eod, r_eof, {q1, q0});
      end
      n_sod += int'(sod); n_sof += int'(sof); n_eod += int'(eod); n_eof += int'(eof);
    end
    checks++;
    if (n_sod == 0 || n_sof == 0 || n_eod == 0 || n_eof == 0) begin
      failures++;
      $display("a flag never fired: sod %0d sof %0d eod %0d eof %0d", n_sod, n_sof, n_eod, n_eof);
    end
    $display("flags seen: sod %0d sof %0d eod %0d eof %0d", n_sod, n_sof, n_eod, n_eof);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
