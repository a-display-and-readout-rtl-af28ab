// Cycle timer of the master controller.
//
// The system has no handshakes: every channel takes one fixed cycle of
// CYCLE_TICKS clocks, set by the slowest readout (about 600 us per channel
// with a 1 MHz clock). Within a cycle of ticks 0..CYCLE_TICKS-1:
//   tick 0                the CAMAC address and the BCD bus change;
//   ticks S1_AT..+S1_W-1  CAMAC strobe S1 (read data settles for half a cycle);
//   tick S1_AT+S1_W       `capture`: the controller latches R lines and Q.
//                         Its bus drivers are registered, so this is the
//                         last tick that S1 is on the bus;
//   RESET_AT..+RESET_W-1  `reset_slot`, used for the end-of-scan BCD reset;
//   strobe window         `strobe_slot`, STROBE_W ticks ending GUARD_TICKS
//                         before the end of the cycle, so the BCD strobe ends
//                         5 us before the BCD lines change;
//   tick CYCLE_TICKS-1    `cycle_end`: everything advances on this edge.
// The 600 us cycle and the 5 us guard band follow the original; the position
// and width of S1, of the strobe and of the reset are this design's choices.
// While `run` is 0 the timer sits at tick 0 and produces nothing, so a
// cycle always starts afresh when the scan resumes.
module master_timing #(
  parameter int unsigned CYCLE_TICKS = 600,
  parameter int unsigned S1_AT       = 300,
  parameter int unsigned S1_W        = 1,
  parameter int unsigned RESET_AT    = 100,
  parameter int unsigned RESET_W     = 10,
  parameter int unsigned STROBE_W    = 10,
  parameter int unsigned GUARD_TICKS = 5
) (
  input  logic clk,
  input  logic rst,
  input  logic run,
  output logic s1,
  output logic capture,
  output logic reset_slot,
  output logic strobe_slot,
  output logic cycle_end
);

  localparam int unsigned TW        = $clog2(CYCLE_TICKS);
  localparam int unsigned STROBE_AT = CYCLE_TICKS - GUARD_TICKS - STROBE_W;

  logic [TW-1:0] tick;

  always_ff @(posedge clk) begin
    if (rst || !run)               tick <= '0;
    else if (tick == TW'(CYCLE_TICKS - 1)) tick <= '0;
    else                           tick <= tick + 1'b1;
  end

  always_comb begin
    s1          = run && tick >= TW'(S1_AT) && tick < TW'(S1_AT + S1_W);
    capture     = run && tick == TW'(S1_AT + S1_W);
    reset_slot  = run && tick >= TW'(RESET_AT) && tick < TW'(RESET_AT + RESET_W);
    strobe_slot = run && tick >= TW'(STROBE_AT) && tick < TW'(STROBE_AT + STROBE_W);
    cycle_end   = run && tick == TW'(CYCLE_TICKS - 1);
  end

  initial begin
    assert (RESET_AT + RESET_W <= S1_AT && S1_AT + S1_W + 32 < STROBE_AT)
      else $error("cycle phases overlap: the conversion needs about 25 ticks after S1");
    assert (STROBE_W + GUARD_TICKS < CYCLE_TICKS) else $error("strobe does not fit");
  end

endmodule
