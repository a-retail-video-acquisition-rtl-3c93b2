// videoflag -- tracks the composite-video sync state and flags where lines
// and fields start and end.
//
// The sync separator delivers HDRIVE (a pulse at the start of each line) and
// VSYNC (held for about nine line times between fields). This three-state
// Mealy machine follows them:
//   ACTIVE_DATA    --HDRIVE & !VSYNC--> BETWEEN_LINES   (EOD)
//   ACTIVE_DATA    --VSYNC-----------> BETWEEN_FIELDS  (EOF)
//   BETWEEN_LINES  --!HDRIVE & !VSYNC-> ACTIVE_DATA     (SOD)
//   BETWEEN_LINES  --VSYNC-----------> BETWEEN_FIELDS  (EOF)
//   BETWEEN_FIELDS --!VSYNC----------> ACTIVE_DATA     (SOF)
// and otherwise stays. The fourth state code is unused and returns to
// ACTIVE_DATA. As in the original PAL, the Mealy outputs are registered with
// the state, so each flag is a one-cycle pulse in the cycle after the
// transition that produced it; registering the asynchronous sync inputs this
// way also synchronises them to the system clock.
//
// Interface: clk (5 MHz system clock), hdrive and vsync active high, the four
// pulse outputs active high. There is no reset input: the registers start
// cleared (ACTIVE_DATA, no flags), as programmable-logic registers do at
// power-up, and the state follows the sync signals within a line or field. Transitions, output equations and state
// codes follow the original design.
module videoflag
  import vcb_pkg::*;
(
  input  logic clk,
  input  logic hdrive,
  input  logic vsync,
  output logic sod = 1'b0,
  output logic sof = 1'b0,
  output logic eod = 1'b0,
  output logic eof = 1'b0,
  output vf_state_e state = VF_ACTIVE_DATA
);

  vf_state_e next_state;
  logic      sod_d, sof_d, eod_d, eof_d;

  always_comb begin
    next_state = state;
    sod_d = 1'b0;
    sof_d = 1'b0;
    eod_d = 1'b0;
    eof_d = 1'b0;
    unique case (state)
      VF_ACTIVE_DATA: begin
        if (vsync) begin
          eof_d      = 1'b1;
          next_state = VF_BETWEEN_FIELDS;
        end else if (hdrive) begin
          eod_d      = 1'b1;
          next_state = VF_BETWEEN_LINES;
        end
      end
      VF_BETWEEN_FIELDS: begin
        if (!vsync) begin
          sof_d      = 1'b1;
          next_state = VF_ACTIVE_DATA;
        end
      end
      VF_BETWEEN_LINES: begin
        if (vsync) begin
          eof_d      = 1'b1;
          next_state = VF_BETWEEN_FIELDS;
        end else if (!hdrive) begin
          sod_d      = 1'b1;
          next_state = VF_ACTIVE_DATA;
        end
      end
      default: next_state = VF_ACTIVE_DATA;
    endcase
  end

  always_ff @(posedge clk) begin
    state <= next_state;
    sod   <= sod_d;
    sof   <= sof_d;
    eod   <= eod_d;
    eof   <= eof_d;
  end

endmodule
