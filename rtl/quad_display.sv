// Quad display unit: four 8-digit Nixie channels on the BCD bus.
//
// Each channel is set to a channel number (001..999, 000 = 1000) by three
// BCD thumbwheels. Receivers take the negative-true BCD bus onto an internal
// positive-true bus; one comparator per channel flags when the wanted channel
// address is on the bus, and the BCD strobe then loads the 8 data digits into
// that channel's latch. The common enable line makes every channel load at
// the strobe, whatever its address, for testing. The latches drive one
// SN74141-style driver per digit, which blanks a digit holding code 10 (the
// suppressed leading zero). Units never affect each other or the master.
// Timing: the latches load on the leading edge of the strobe (falling edge of
// strobe_n); the address and data lines have been stable since the start of
// the cycle, about 580 us earlier. Loading on the leading edge is this
// design's choice; the rest follows the original unit. `shown` brings the latched
// digits out beside the cathode drives.
module quad_display
  import scaler_pkg::*;
#(
  parameter int unsigned CHANNELS = 4
) (
  input  bcd_bus_t                     bcd,
  input  bcd_addr_t [CHANNELS-1:0]     thumbwheel,
  output bcd_data_t [CHANNELS-1:0]     shown,
  output logic [CHANNELS-1:0][DATA_DIGITS-1:0][9:0] cathode
);

  // internal bus (line receivers)
  logic      strobe_n;
  bcd_addr_t addr;
  bcd_data_t data;
  logic      enable;
  logic [CHANNELS-1:0] match;

  assign strobe_n = bcd.strobe_n;
  assign addr     = ~bcd.addr_n;
  assign data     = ~bcd.data_n;
  assign enable   = !bcd.enable_n;

  for (genvar ch = 0; ch < CHANNELS; ch++) begin : g_chan
    assign match[ch] = (addr == thumbwheel[ch]) || enable;

    always_ff @(negedge strobe_n) begin
      if (match[ch]) shown[ch] <= data;
    end

    for (genvar d = 0; d < DATA_DIGITS; d++) begin : g_digit
      nixie_driver_74141 u_drv (.bcd(shown[ch][d]), .cathode(cathode[ch][d]));
    end
  end

  logic unused;
  assign unused = bcd.reset_n;

endmodule
