// Serial binary-to-BCD converter.
//
// Converts the 24-bit scaler word read from the CAMAC bus into 8 BCD digits,
// one binary bit per clock, most significant bit first. Before each shift
// every BCD digit that holds 5 or more has 3 added, so the left shift of the
// whole BCD register doubles it in decimal and the new binary bit is added
// at the units end. After BIN_W clocks the BCD register holds the value.
// The master controller uses a serial converter; the add-3 form of the
// correction is this design's choice.
// Interface: pulse `start` with `bin` valid; `busy` is 1 for BIN_W clocks;
// `done` pulses on the clock the result `bcd` becomes valid, BIN_W clocks
// after `start`. `bcd` then holds until the next start.
module bin2bcd_serial
  import scaler_pkg::*;
#(
  parameter int unsigned BIN_W  = DATA_W,
  parameter int unsigned DIGITS = DATA_DIGITS
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   start,
  input  logic [BIN_W-1:0]       bin,
  output logic                   busy,
  output logic                   done,
  output logic [DIGITS-1:0][3:0] bcd
);

  localparam int unsigned CNT_W = $clog2(BIN_W + 1);

  logic [BIN_W-1:0]       shreg;
  logic [CNT_W-1:0]       bits_left;
  logic [DIGITS-1:0][3:0] corrected;
  // corrected digits with the new bit below; the top bit always 0 for
  // BIN_W = 24, DIGITS = 8 (2^24 - 1 has 8 digits) and is dropped
  logic [4*DIGITS:0]      shifted;

  always_comb begin
    for (int d = 0; d < DIGITS; d++) begin
      corrected[d] = (bcd[d] >= 4'd5) ? bcd[d] + 4'd3 : bcd[d];
    end
    shifted = {corrected, shreg[BIN_W-1]};
  end

  assign busy = (bits_left != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '0;
      bits_left <= '0;
      bcd       <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        shreg     <= bin;
        bits_left <= CNT_W'(BIN_W);
        bcd       <= '0;
      end else if (busy) begin
        bcd       <= shifted[4*DIGITS-1:0];
        shreg     <= shreg << 1;
        bits_left <= bits_left - 1'b1;
        done      <= (bits_left == CNT_W'(1));
      end
    end
  end

endmodule
