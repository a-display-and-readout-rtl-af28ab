// Preset count unit on the BCD bus.
//
// Watches one channel, chosen 001..999 (000 = 1000) on three thumbwheels,
// and stops counting once that channel reaches a preset of M x 10^E, with M
// (1..9) and E (0..7) on two more switches. At every BCD strobe carrying the
// chosen channel the count is compared with the preset digit by digit: it
// has reached the preset when any digit above position E is non-zero, or
// digit E is at least M. Code 10 (a blanked leading zero) counts as 0. Once
// reached, `reached` stays set until `preset_reset` (front panel, async).
// The gate outputs come in both senses: `gate` is 1 while counting is
// allowed, `gate_n` is its complement (the hardware offers TTL and 12 V
// versions of each; here they are logic levels). Because the system scans,
// the stop comes up to one scan late; the final count on a display shows by
// how much. M = 0 makes the preset trip at the first look.
// Timing: compare and set on the leading edge of the strobe (falling edge of
// strobe_n). The original unit gives the channel range, the M x 10^E form and
// the true/false outputs; the comparison method and reset are this design's.
module preset_unit
  import scaler_pkg::*;
(
  input  bcd_bus_t   bcd,
  input  bcd_addr_t  channel,
  input  logic [3:0] mult,        // M, 1..9
  input  logic [2:0] exponent,    // E, 0..7
  input  logic       preset_reset,
  output logic       reached,
  output logic       gate,
  output logic       gate_n
);

  logic      strobe_n;
  bcd_addr_t addr;
  bcd_data_t data;
  logic      hit;

  assign strobe_n = bcd.strobe_n;
  assign addr     = ~bcd.addr_n;

  always_comb begin
    for (int d = 0; d < DATA_DIGITS; d++) begin
      data[d] = (~bcd.data_n[d] == BCD_BLANK) ? 4'd0 : ~bcd.data_n[d];
    end
    hit = 1'b0;
    for (int d = 0; d < DATA_DIGITS; d++) begin
      if (d > int'(exponent) && data[d] != 4'd0) hit = 1'b1;
      if (d == int'(exponent) && data[d] >= mult) hit = 1'b1;
    end
  end

  always_ff @(negedge strobe_n or posedge preset_reset) begin
    if (preset_reset)                reached <= 1'b0;
    else if (addr == channel && hit) reached <= 1'b1;
  end

  assign gate   = !reached;
  assign gate_n = reached;

  logic unused;
  assign unused = ^{bcd.reset_n, bcd.enable_n};

endmodule
