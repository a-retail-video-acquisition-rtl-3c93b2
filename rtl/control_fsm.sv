// control_fsm -- the board's controller: capture one field, then send it.
//
// Capture half. From IDLE a Start Capture request clears the address, pixel
// and line registers and moves to SOFWAIT, which waits for the start-of-field
// flag (clearing the registers again). SODWAIT waits for the start of a line
// with the A/D buffer driving the bus. Each line is then stored as 128 pixel
// pairs by a two-state loop: SRAMAWRITE writes a sample into SRAM A and
// SRAMBWRITE the next sample into SRAM B at the same address, advancing the
// address and pixel registers. When the pixel register flags the last pair
// (EQ256) the line count is bumped and the FSM returns to SODWAIT; once the
// line register flags PAGEEND it clears the registers again and turns to
// transmission.
//
// Transmission half, one pixel pair per pass, using a ready/acknowledge
// handshake with the host:
//   TRANSSTART  SRAM A drives the bus; bACK is raised for the next cycle
//   TRAN1       hold bACK until cACK rises, then switch the bus to SRAM B
//   TRAN2       wait for cACK to fall
//   TRAN3       raise bACK for the SRAM B byte
//   TRAN4       hold bACK until cACK rises
//   TRAN5       wait for cACK to fall, then advance address and pixel count
//   TRAN6       last pair of the line? bump the line count : next pair
//   TRAN7       last line? back to IDLE : next pair
// The three unused state codes return to IDLE on the next clock. RESET, from
// the host, sends the FSM to IDLE from any state and clears all outputs. The
// registers start in IDLE with all commands off, as programmable-logic
// registers clear at power-up.
//
// Timing: all command outputs are Mealy outputs that are registered together
// with the state, so a command decided in state S is in effect during the
// cycle after it (for example the SRAM A write enable decided in SODWAIT is
// active during SRAMAWRITE). PAGECNT is the exception: it is combinational,
// so the line register has already advanced when the FSM next looks at
// PAGEEND. The inputs are expected to be synchronous to clk.
//
// States, transitions, output assignments and the registered/combinational
// split follow the original design; the state codes are those of its PAL
// equations.
module control_fsm
  import vcb_pkg::*;
(
  input  logic        clk,
  input  logic        reset,     // host Reset, synchronous, active high
  input  logic        capimage,  // host Start Capture
  input  logic        cack,      // host acknowledge
  input  logic        sof,       // start of field (videoflag)
  input  logic        sod,       // start of line data (videoflag)
  input  logic        eq256,     // last pixel pair of the line
  input  logic        pageend,   // all lines counted
  output ctrl_cmd_t   cmd = '0,  // registered commands
  output logic        pagecnt,   // combinational line-count increment
  output ctrl_state_e state = CS_IDLE
);

  ctrl_state_e next_state;
  ctrl_cmd_t   cmd_d;

  always_comb begin
    next_state = state;
    cmd_d      = '0;
    pagecnt    = 1'b0;
    if (reset) begin
      next_state = CS_IDLE;
    end else begin
      unique case (state)
        CS_IDLE: begin
          if (capimage) begin
            cmd_d.marclear  = 1'b1;
            cmd_d.cntclear  = 1'b1;
            cmd_d.adoe      = 1'b1;
            cmd_d.pageclear = 1'b1;
            next_state      = CS_SOFWAIT;
          end
        end
        CS_SOFWAIT: begin
          if (sof) begin
            cmd_d.marclear  = 1'b1;
            cmd_d.cntclear  = 1'b1;
            cmd_d.adoe      = 1'b1;
            cmd_d.pageclear = 1'b1;
            next_state      = CS_SODWAIT;
          end
        end
        CS_SODWAIT: begin
          if (pageend) begin
            cmd_d.marclear  = 1'b1;
            cmd_d.cntclear  = 1'b1;
            cmd_d.pageclear = 1'b1;
            cmd_d.sramaoe   = 1'b1;
            next_state      = CS_TRANSSTART;
          end else if (sod) begin
            cmd_d.sramawe = 1'b1;
            cmd_d.adoe    = 1'b1;
            next_state    = CS_SRAMAWRITE;
          end else begin
            cmd_d.adoe = 1'b1;
          end
        end
        CS_SRAMAWRITE: begin
          cmd_d.srambwe = 1'b1;
          cmd_d.cntcnt  = 1'b1;
          cmd_d.marcnt  = 1'b1;
          cmd_d.adoe    = 1'b1;
          next_state    = CS_SRAMBWRITE;
        end
        CS_SRAMBWRITE: begin
          if (eq256) begin
            cmd_d.cntclear = 1'b1;
            cmd_d.adoe     = 1'b1;
            pagecnt        = 1'b1;
            next_state     = CS_SODWAIT;
          end else begin
            cmd_d.sramawe = 1'b1;
            cmd_d.adoe    = 1'b1;
            next_state    = CS_SRAMAWRITE;
          end
        end
        CS_TRANSSTART: begin
          cmd_d.back    = 1'b1;
          cmd_d.sramaoe = 1'b1;
          next_state    = CS_TRAN1;
        end
        CS_TRAN1: begin
          if (cack) begin
            cmd_d.sramboe = 1'b1;
            next_state    = CS_TRAN2;
          end else begin
            cmd_d.back    = 1'b1;
            cmd_d.sramaoe = 1'b1;
          end
        end
        CS_TRAN2: begin
          cmd_d.sramboe = 1'b1;
          if (!cack) next_state = CS_TRAN3;
        end
        CS_TRAN3: begin
          cmd_d.back    = 1'b1;
          cmd_d.sramboe = 1'b1;
          next_state    = CS_TRAN4;
        end
        CS_TRAN4: begin
          if (cack) begin
            next_state = CS_TRAN5;
          end else begin
            cmd_d.back    = 1'b1;
            cmd_d.sramboe = 1'b1;
          end
        end
        CS_TRAN5: begin
          if (!cack) begin
            cmd_d.cntcnt = 1'b1;
            cmd_d.marcnt = 1'b1;
            next_state   = CS_TRAN6;
          end
        end
        CS_TRAN6: begin
          if (eq256) begin
            cmd_d.cntclear = 1'b1;
            pagecnt        = 1'b1;
            next_state     = CS_TRAN7;
          end else begin
            cmd_d.sramaoe = 1'b1;
            next_state    = CS_TRANSSTART;
          end
        end
        CS_TRAN7: begin
          if (pageend) begin
            next_state = CS_IDLE;
          end else begin
            cmd_d.sramaoe = 1'b1;
            next_state    = CS_TRANSSTART;
          end
        end
        default: next_state = CS_IDLE;  // trap states
      endcase
    end
  end

  always_ff @(posedge clk) begin
    state <= next_state;
    cmd   <= cmd_d;
  end

  // At most one driver on the shared data bus, and no SRAM write while an
  // SRAM drives the bus.
  a_one_bus_driver: assert property (@(posedge clk)
    $onehot0({cmd.adoe, cmd.sramaoe, cmd.sramboe}));
  a_no_write_while_read: assert property (@(posedge clk)
    !((cmd.sramawe || cmd.srambwe) && (cmd.sramaoe || cmd.sramboe)));

endmodule
