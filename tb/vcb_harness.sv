// vcb_harness -- drives the video capture board as a camera and a host would,
// and checks the field that comes back.
//
// Camera side: a free-running sync generator on the system clock. A field is
// FIELD_LINES lines of LINE_CYC cycles; HDRIVE is high for the first HPW
// cycles of each line and VSYNC for the first VS_LINES lines. The "A/D"
// output is a known function of field, line and cycle, pix(f, l, t), so the
// expected picture can be computed here: the first picture line is the first
// line after VSYNC, and pixel j of a line is the sample of cycle HPW + 2 + j
// (HDRIVE falls at cycle HPW; one cycle for the sync FSM to flag the start
// of data and one for the controller to react), one sample per cycle.
//
// Host side, acting between clock edges: it raises Start Capture in the
// middle of a field (so the board must wait for the next field to start),
// then for every byte waits for bACK, un-inverts and checks the byte, raises
// cACK after a random delay, waits for bACK to fall and lowers cACK after a
// random delay. It checks the board's response times: bACK for the SRAM B
// byte 3 cycles after cACK falls, for the next pair's SRAM A byte 4 cycles
// after, 5 at a line end (cACK is registered once, then the controller's
// states take one cycle each), and that each byte after the first is already
// on the bus in the cycle before bACK rises (for the first byte the address
// register is still being cleared in that cycle). After the last byte the
// board must be idle.
// Optionally it runs two aborted captures first: Reset during the capture
// and Reset during the transmission, each checked to leave the board idle.
//
// Counted mechanisms: field waits, lines stored, slow acknowledges held by
// the board, resets, completed fields; each must occur at least once.
`timescale 1ns/1ps
module vcb_harness
  import vcb_pkg::*;
#(
  parameter int unsigned PIX         = 256,
  parameter int unsigned LINES       = 240,
  parameter int unsigned LINE_CYC    = 320,   // 64 us at 5 MHz
  parameter int unsigned HPW         = 24,
  parameter int unsigned FIELD_LINES = 262,
  parameter int unsigned VS_LINES    = 9,
  parameter int unsigned CAPTURES    = 1,
  parameter bit          ABORTS      = 1'b0,
  parameter int unsigned MAX_DELAY   = 3,
  parameter longint      WATCHDOG    = 64'd5_000_000
) (
  output logic        clk_10mhz,
  input  logic        sysclk,
  output logic        hdrive,
  output logic        vsync,
  output logic [7:0]  adc_data,
  output logic [7:0]  pc_dor,
  input  logic [7:0]  pc_data,
  input  logic        pc_back,
  input  ctrl_state_e state
);

  int checks = 0, failures = 0;
  int n_sofwait = 0, n_lines = 0, n_slow_ack = 0, n_resets = 0, n_fields = 0;

  initial clk_10mhz = 1'b0;
  always #50 clk_10mhz = ~clk_10mhz;

  // ---------------------------------------------------------------- camera
  int unsigned field_no = 0, line_no = 0, t = 0;

  function automatic logic [7:0] pix(input int unsigned f, input int unsigned l,
                                     input int unsigned c);
    return 8'((l * 5) + (c * 3) + (f * 11));
  endfunction

  initial begin
    hdrive = 1'b1; vsync = 1'b1; adc_data = '0;
  end

  always @(posedge sysclk) begin
    int unsigned nt, nl, nf;
    nt = t + 1; nl = line_no; nf = field_no;
    if (nt == LINE_CYC) begin
      nt = 0; nl++;
      if (nl == FIELD_LINES) begin nl = 0; nf++; end
    end
    t <= nt; line_no <= nl; field_no <= nf;
    hdrive   <= (nt < HPW);
    vsync    <= (nl < VS_LINES);
    adc_data <= pix(nf, nl, nt);
  end

  // ------------------------------------------------------------ monitoring
  ctrl_state_e prev_state = CS_IDLE;
  always @(posedge sysclk) begin
    if (state == CS_SOFWAIT && prev_state == CS_SOFWAIT) n_sofwait++;
    if (state == CS_SRAMAWRITE && prev_state == CS_SODWAIT) n_lines++;
    if (state == CS_TRAN1 && prev_state == CS_TRAN1) n_slow_ack++;
    prev_state <= state;
  end

  // ------------------------------------------------------------------ host
  task automatic wait_cycles(input int n);
    repeat (n) @(negedge sysclk);
  endtask

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("%0t: %s", $time, msg);
  endtask

  // Start a capture in the middle of a field; return the field captured.
  task automatic start_capture(output int unsigned cap_field);
    while (!(line_no == FIELD_LINES / 2 && t == 0)) @(negedge sysclk);
    cap_field = field_no + 1;
    pc_dor[DOR_CAPTURE] = 1'b1;
    wait_cycles(3);
    pc_dor[DOR_CAPTURE] = 1'b0;
  endtask

  task automatic host_reset();
    pc_dor[DOR_RESET] = 1'b1;
    wait_cycles(3);
    pc_dor[DOR_RESET] = 1'b0;
    wait_cycles(1);
    checks++;
    if (state != CS_IDLE || pc_back) fail("board not idle after Reset");
    n_resets++;
  endtask

  // Receive one full field and compare it with the camera's picture.
  task automatic receive_field(input int unsigned cap_field);
    int wait_cnt, lat;
    logic [7:0] got, want, early;
    for (int unsigned idx = 0; idx < PIX * LINES; idx++) begin
      int unsigned l, j;
      l = idx / PIX; j = idx % PIX;
      wait_cnt = 0;
      while (!pc_back) begin
        @(negedge sysclk);
        wait_cnt++;
        if (wait_cnt > 4 * FIELD_LINES * LINE_CYC) begin
          fail($sformatf("no bACK for byte %0d", idx));
          return;
        end
      end
      got  = pc_data ^ PORT_INVERT_MASK;
      want = pix(cap_field, VS_LINES + l, HPW + 2 + j);
      checks++;
      if (got !== want)
        fail($sformatf("line %0d pixel %0d: got %h, want %h", l, j, got, want));
      wait_cycles($urandom_range(0, MAX_DELAY));
      pc_dor[DOR_CACK] = 1'b1;
      wait_cnt = 0;
      while (pc_back) begin
        @(negedge sysclk);
        if (++wait_cnt > 100) begin fail("bACK stuck high"); return; end
      end
      wait_cycles($urandom_range(0, MAX_DELAY));
      pc_dor[DOR_CACK] = 1'b0;
      if (idx + 1 < PIX * LINES) begin
        // Response time for the next byte.
        lat = 0;
        while (!pc_back && lat < 100) begin
          early = pc_data;
          @(negedge sysclk);
          lat++;
        end
        // The byte is on the bus one clock before bACK rises.
        checks++;
        if (early !== pc_data)
          fail($sformatf("byte %0d changed in the cycle bACK rose", idx + 1));
        checks++;
        if (j % 2 == 0 && lat != 3)
          fail($sformatf("SRAM B byte %0d after %0d cycles, want 3", idx + 1, lat));
        else if (j % 2 == 1 && j != PIX - 1 && lat != 4)
          fail($sformatf("next pair %0d after %0d cycles, want 4", idx + 1, lat));
        else if (j == PIX - 1 && lat != 5)
          fail($sformatf("next line %0d after %0d cycles, want 5", idx + 1, lat));
      end
    end
    wait_cycles(8);
    checks++;
    if (state != CS_IDLE || pc_back) fail("board not idle after the field");
    else n_fields++;
  endtask

  initial begin : host
    int unsigned f;
    pc_dor = '0;
    wait_cycles(2);
    host_reset();
    if (ABORTS) begin
      // Reset in the middle of storing a field.
      start_capture(f);
      while (!(field_no == f && line_no == VS_LINES + LINES / 2)) @(negedge sysclk);
      checks++;
      if (state != CS_SODWAIT && state != CS_SRAMAWRITE && state != CS_SRAMBWRITE)
        fail("board not capturing in the middle of the field");
      host_reset();
      // Reset in the middle of sending a field.
      start_capture(f);
      while (!pc_back) @(negedge sysclk);
      pc_dor[DOR_CACK] = 1'b1;
      wait_cycles(5);
      pc_dor[DOR_CACK] = 1'b0;
      while (!pc_back) @(negedge sysclk);
      host_reset();
    end
    for (int c = 0; c < CAPTURES; c++) begin
      start_capture(f);
      receive_field(f);
    end
    checks++;
    if (n_sofwait == 0 || n_lines == 0 || n_slow_ack == 0 || n_resets == 0 ||
        n_fields != CAPTURES)
      fail("a mechanism was not exercised");
    $display("field waits %0d, lines stored %0d, slow acknowledges %0d, resets %0d, fields received %0d",
             n_sofwait, n_lines, n_slow_ack, n_resets, n_fields);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge sysclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
