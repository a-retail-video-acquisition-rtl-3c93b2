// tb_control_fsm -- walks the controller through a capture and a
// transmission and checks every state and command.
//
// Each step sets the inputs before a clock edge and then compares the new
// state and the registered commands with the values expected from the
// controller's transition table; the combinational PAGECNT is checked before
// the edge. The walk covers the wait states with their inputs low, the
// SRAM A / SRAM B write loop, the end of a line and of the field, both
// halves of the handshake with a slow host, the per-pair and per-line
// returns to TRANSSTART, the return to IDLE, the host Reset from the middle
// of a capture, and recovery from each of the three trap states.
`timescale 1ns/1ps
module tb_control_fsm;
  import vcb_pkg::*;
  logic clk = 1'b0;
  logic reset, capimage, cack, sof, sod, eq256, pageend;
  ctrl_cmd_t   cmd;
  logic        pagecnt;
  ctrl_state_e state;
  int checks = 0, failures = 0;

  control_fsm dut (.clk, .reset, .capimage, .cack, .sof, .sod, .eq256,
                   .pageend, .cmd, .pagecnt, .state);

  always #100 clk = ~clk;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Command sets, named after the outputs that are high.
  function automatic ctrl_cmd_t c(input string names);
    ctrl_cmd_t r = '0;
    string tok = "";
    for (int i = 0; i <= names.len(); i++) begin
      if (i == names.len() || names[i] == " ") begin
        case (tok)
          "adoe":      r.adoe = 1'b1;
          "aoe":       r.sramaoe = 1'b1;
          "boe":       r.sramboe = 1'b1;
          "awe":       r.sramawe = 1'b1;
          "bwe":       r.srambwe = 1'b1;
          "marclr":    r.marclear = 1'b1;
          "marcnt":    r.marcnt = 1'b1;
          "cntclr":    r.cntclear = 1'b1;
          "cntcnt":    r.cntcnt = 1'b1;
          "pageclr":   r.pageclear = 1'b1;
          "back":      r.back = 1'b1;
          "":          ;
          default:     $fatal(1, "bad name %s", tok);
        endcase
        tok = "";
      end else begin
        tok = {tok, names.substr(i, i)};
      end
    end
    return r;
  endfunction

  task automatic step(input ctrl_state_e want_state, input string want_cmd,
                      input logic want_pagecnt = 1'b0);
    #1;
    checks++;
    if (pagecnt !== want_pagecnt) begin
      failures++;
      $display("%0t: in %s pagecnt %b, want %b", $time, state.name(), pagecnt, want_pagecnt);
    end
    @(posedge clk); #1;
    checks++;
    if (state !== want_state || cmd !== c(want_cmd)) begin
      failures++;
      $display("%0t: state %s cmd %b, want %s cmd %b (%s)", $time, state.name(), cmd,
               want_state.name(), c(want_cmd), want_cmd);
    end
    @(negedge clk);
  endtask

  task automatic clear_inputs();
    {reset, capimage, cack, sof, sod, eq256, pageend} = '0;
  endtask

  initial begin
    clear_inputs();
    @(negedge clk);
    reset = 1'b1;
    step(CS_IDLE, "");
    reset = 1'b0;
    step(CS_IDLE, "");
    capimage = 1'b1;
    step(CS_SOFWAIT, "marclr cntclr adoe pageclr");
    capimage = 1'b0;
    step(CS_SOFWAIT, "");
    sof = 1'b1;
    step(CS_SODWAIT, "marclr cntclr adoe pageclr");
    sof = 1'b0;
    step(CS_SODWAIT, "adoe");
    // Two lines of two pairs each.
    for (int line = 0; line < 2; line++) begin
      sod = 1'b1;
      step(CS_SRAMAWRITE, "awe adoe");
      sod = 1'b0;
      step(CS_SRAMBWRITE, "bwe cntcnt marcnt adoe");
      step(CS_SRAMAWRITE, "awe adoe");
      step(CS_SRAMBWRITE, "bwe cntcnt marcnt adoe");
      eq256 = 1'b1;
      step(CS_SODWAIT, "cntclr adoe", 1'b1);
      eq256 = 1'b0;
      step(CS_SODWAIT, "adoe");
    end
    pageend = 1'b1;
    step(CS_TRANSSTART, "marclr cntclr pageclr aoe");
    pageend = 1'b0;
    for (int pair = 0; pair < 3; pair++) begin
      step(CS_TRAN1, "back aoe");
      step(CS_TRAN1, "back aoe");           // host slow to acknowledge
      cack = 1'b1;
      step(CS_TRAN2, "boe");
      step(CS_TRAN2, "boe");                // host slow to release
      cack = 1'b0;
      step(CS_TRAN3, "boe");
      step(CS_TRAN4, "back boe");
      step(CS_TRAN4, "back boe");
      cack = 1'b1;
      step(CS_TRAN5, "");
      step(CS_TRAN5, "");
      cack = 1'b0;
      step(CS_TRAN6, "cntcnt marcnt");
      if (pair == 0) begin
        step(CS_TRANSSTART, "aoe");         // next pair of the line
      end else begin
        eq256 = 1'b1;
        step(CS_TRAN7, "cntclr", 1'b1);     // end of the line
        eq256 = 1'b0;
        if (pair == 1) begin
          step(CS_TRANSSTART, "aoe");       // next line
        end else begin
          pageend = 1'b1;
          step(CS_IDLE, "");                // end of the field
          pageend = 1'b0;
        end
      end
    end
    step(CS_IDLE, "");
    // Reset in the middle of a capture.
    capimage = 1'b1;
    step(CS_SOFWAIT, "marclr cntclr adoe pageclr");
    capimage = 1'b0;
    sof = 1'b1;
    step(CS_SODWAIT, "marclr cntclr adoe pageclr");
    sof = 1'b0; sod = 1'b1;
    step(CS_SRAMAWRITE, "awe adoe");
    sod = 1'b0; reset = 1'b1;
    step(CS_IDLE, "");
    reset = 1'b0;
    step(CS_IDLE, "");
    // Trap states return to IDLE.
    for (int t = 13; t <= 15; t++) begin
      @(posedge clk);
      force dut.state = ctrl_state_e'(t);
      #1;
      release dut.state;
      checks++;
      if (state !== ctrl_state_e'(t)) begin
        failures++;
        $display("could not place the FSM in trap state %0d", t);
      end
      @(negedge clk);
      capimage = 1'b1;                      // must not be taken from a trap
      step(CS_IDLE, "");
      capimage = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
