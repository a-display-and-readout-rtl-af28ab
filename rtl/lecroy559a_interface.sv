// Interface from the BCD bus to a LeCroy 559A display generator.
//
// The display generator shows up to 160 channels of 8 BCD digits on an X-Y
// scope and counts channels itself: every clock takes the next channel, and
// a reset returns it to the first. This unit
//   - receives the negative-true BCD bus and presents positive-true data;
//   - stores the data word at each BCD strobe, so the generator reads a
//     steady word;
//   - turns code 10 (a suppressed leading zero) back into 0, because the
//     generator blanks leading zeros on its own;
//   - passes the strobe as the generator's clock and the BCD reset as its
//     channel-counter reset.
// Timing: the store happens on the leading edge of the strobe (falling edge
// of strobe_n); `lc_clock` is high for the strobe's width, so the generator
// can take the stored word on its falling edge. Choice of edge is this
// design's; the functions are those of the original interface.
module lecroy559a_interface
  import scaler_pkg::*;
(
  input  bcd_bus_t  bcd,
  output bcd_data_t lc_data,
  output logic      lc_clock,
  output logic      lc_reset
);

  logic      strobe_n;
  bcd_data_t data;

  assign strobe_n = bcd.strobe_n;

  always_comb begin
    for (int d = 0; d < DATA_DIGITS; d++) begin
      data[d] = (~bcd.data_n[d] == BCD_BLANK) ? 4'd0 : ~bcd.data_n[d];
    end
  end

  always_ff @(negedge strobe_n) lc_data <= data;

  assign lc_clock = !bcd.strobe_n;
  assign lc_reset = !bcd.reset_n;

  logic unused;
  assign unused = ^{bcd.addr_n, bcd.enable_n};

endmodule
