// Master controller of the scaler display system.
//
// All timing and control of the system lives here. The controller scans the
// CAMAC crates with the Q-scan rule (camac_addr_gen), reads each channel
// with F(0), converts the 24-bit word to 8 BCD digits with a serial converter
// (bin2bcd_serial), optionally blanks leading zeros with code 10
// (bcd_zero_suppress), and puts the digits on the BCD bus together with the
// channel number from a BCD counter (bcd_channel_counter). The work is
// pipelined over fixed cycles (master_timing): while address k is on the
// CAMAC bus, the data of address k-1 is on the BCD bus and the data of k-2
// is what the readouts show. A BCD strobe near the end of each cycle that
// carries data loads the readouts; it ends GUARD_TICKS before the BCD lines
// change. Addresses answering Q = 0 produce no data and no strobe in the
// following cycle. A word is strobed only once: should a disable cut into
// a cycle after its strobe, the restarted cycle reads again but does not
// strobe the same word twice. Two cycles after the scan wraps, a BCD reset pulse tells
// the readouts (the LeCroy 559A channel counter) that the next strobe
// carries channel 001.
//
// Front panel and control lines:
//   test_mode     scan stops; the bus carries F(25), crate 7, station 31
//                 (every channel of every crate) and each rising edge of
//                 `test_pulse` makes one S1, adding one count to every channel;
//   reset_all     C and S2 on the bus while held (clears all channels); the
//                 manual button and the electrical input share this port;
//   inhibit_all   I on the bus while held;
//   zero_suppress enables leading-zero blanking;
//   display_test  common enable line of the BCD bus: all readouts load;
//   disable_n     the computer's disable line: the scan stops and every
//                 driver of the controller, CAMAC and BCD, is released so the
//                 computer can use the bus. The interrupted cycle starts again
//                 from tick 0 when the line is released.
// Bus drivers are registered (one clock after the internal signals) and
// negative true; a released line is 1. The controller never drives Z, the
// write lines or the disable line: those belong to a computer. It does not
// use the L demand either. The printer interface is included.
// From the original system: the Q-scan, pipelining, strobe, guard band, BCD reset, test,
// reset, inhibit and disable functions. This design's choices: the 1 MHz
// clock, two-flop synchronisers on disable_n and test_pulse, the tick
// positions of S1, strobe and reset, and full cycles for Q = 0 addresses.
module master_controller
  import scaler_pkg::*;
#(
  parameter int unsigned NUM_CRATES  = 7,
  parameter int unsigned CYCLE_TICKS = 600,
  parameter int unsigned GUARD_TICKS = 5,
  parameter int unsigned S1_AT       = 300,
  parameter int unsigned RESET_AT    = 100,
  parameter int unsigned STROBE_W    = 10
) (
  input  logic        clk,
  input  logic        rst,
  // CAMAC bus
  output camac_cmd_t  cmd_drv,
  input  logic        disable_n,
  input  camac_resp_t resp,
  // BCD bus
  output bcd_bus_t    bcd_drv,
  // front panel
  input  logic        test_mode,
  input  logic        test_pulse,
  input  logic        reset_all,
  input  logic        inhibit_all,
  input  logic        zero_suppress,
  input  logic        display_test,
  // printer
  input  logic        print_req,
  input  logic        printer_busy,
  output logic        print_cmd,
  output bcd_addr_t   print_addr,
  output bcd_data_t   print_data,
  output logic        printing
);

  // ---- synchronisers -------------------------------------------------------
  logic [1:0] dis_sync, tp_sync;
  logic       tp_d;
  logic       disabled, test_s1;

  always_ff @(posedge clk) begin
    if (rst) begin
      dis_sync <= '0;
      tp_sync  <= '0;
      tp_d     <= 1'b0;
    end else begin
      dis_sync <= {dis_sync[0], !disable_n};
      tp_sync  <= {tp_sync[0], test_pulse};
      tp_d     <= tp_sync[1];
    end
  end

  assign disabled = dis_sync[1];
  assign test_s1  = test_mode && tp_sync[1] && !tp_d;

  // ---- cycle timer ---------------------------------------------------------
  logic run, s1, capture, reset_slot, strobe_slot, cycle_end;

  assign run = !disabled && !test_mode;

  master_timing #(
    .CYCLE_TICKS(CYCLE_TICKS), .S1_AT(S1_AT), .RESET_AT(RESET_AT),
    .STROBE_W(STROBE_W), .GUARD_TICKS(GUARD_TICKS)
  ) u_timing (
    .clk, .rst, .run, .s1, .capture, .reset_slot, .strobe_slot, .cycle_end
  );

  // ---- CAMAC address generator --------------------------------------------
  logic [CRATE_W-1:0] crate;
  logic [N_W-1:0]     n;
  logic [A_W-1:0]     a;
  logic               wrap;
  logic               q_cap;

  camac_addr_gen #(.NUM_CRATES(NUM_CRATES)) u_addr (
    .clk, .rst, .advance(cycle_end), .q(q_cap), .crate, .n, .a, .wrap
  );

  // ---- read, convert, suppress --------------------------------------------
  logic      conv_busy, conv_done;
  bcd_data_t conv_bcd, shown_bcd;
  bcd_addr_t chan, chan_cap;

  always_ff @(posedge clk) begin
    if (rst) begin
      q_cap    <= 1'b0;
      chan_cap <= '{default: 4'd0};
    end else if (capture) begin
      q_cap    <= !resp.q_n;
      chan_cap <= chan;
    end
  end

  bin2bcd_serial u_conv (
    .clk, .rst, .start(capture && !resp.q_n), .bin(~resp.r_n),
    .busy(conv_busy), .done(conv_done), .bcd(conv_bcd)
  );

  bcd_zero_suppress u_zs (.enable(zero_suppress), .din(conv_bcd), .dout(shown_bcd));

  bcd_channel_counter u_chan (
    .clk, .rst, .clear(wrap), .inc(cycle_end && q_cap), .count(chan)
  );

  // ---- BCD stage: data of the previous address -----------------------------
  logic strobe, strobe_d, bcd_reset, bcd_reset_d;
  bcd_addr_t bcd_addr;
  bcd_data_t bcd_data;
  logic      bcd_valid;
  logic      eos_d1, eos_d2;

  always_ff @(posedge clk) begin
    if (rst) begin
      bcd_addr  <= '{default: 4'd0};
      bcd_data  <= '{default: 4'd0};
      bcd_valid <= 1'b0;
      eos_d1    <= 1'b0;
      eos_d2    <= 1'b1;      // reset the readouts once after power-up
    end else begin
      if (wrap) eos_d1 <= 1'b1;
      // a word is strobed once, even if a disable restarts its cycle
      if (strobe_d && !strobe) bcd_valid <= 1'b0;
      if (cycle_end) begin
        bcd_valid <= q_cap;
        if (q_cap) begin
          bcd_addr <= chan_cap;
          bcd_data <= shown_bcd;
        end
        eos_d2 <= eos_d1;
        eos_d1 <= 1'b0;
      end
    end
  end

  assign strobe    = strobe_slot && bcd_valid;
  assign bcd_reset = reset_slot && eos_d2;

  // ---- line drivers (registered, negative true, open collector) ------------
  always_ff @(posedge clk) begin
    if (rst || disabled) begin
      cmd_drv <= CMD_RELEASED;
      bcd_drv <= BCD_RELEASED;
    end else begin
      cmd_drv        <= CMD_RELEASED;
      if (test_mode) begin
        cmd_drv.crate_n <= ~CRATE_ALL;
        cmd_drv.n_n     <= ~N_ALL;
        cmd_drv.a_n     <= '1;
        cmd_drv.f_n     <= ~F_TEST_INCR;
        cmd_drv.s1_n    <= !test_s1;
      end else begin
        cmd_drv.crate_n <= ~crate;
        cmd_drv.n_n     <= ~n;
        cmd_drv.a_n     <= ~a;
        cmd_drv.f_n     <= ~F_READ;
        cmd_drv.s1_n    <= !s1;
      end
      cmd_drv.c_n  <= !reset_all;
      cmd_drv.s2_n <= !reset_all;
      cmd_drv.i_n  <= !inhibit_all;

      bcd_drv.addr_n   <= ~bcd_addr;
      bcd_drv.data_n   <= ~bcd_data;
      bcd_drv.strobe_n <= !strobe;
      bcd_drv.reset_n  <= !bcd_reset;
      bcd_drv.enable_n <= !display_test;
    end
  end

  // ---- printer interface ---------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      strobe_d    <= 1'b0;
      bcd_reset_d <= 1'b0;
    end else begin
      strobe_d    <= strobe;
      bcd_reset_d <= bcd_reset;
    end
  end

  printer_interface u_printer (
    .clk, .rst, .print_req,
    .strobe(strobe && !strobe_d), .bcd_reset(bcd_reset && !bcd_reset_d),
    .addr(bcd_addr), .data(bcd_data), .printer_busy,
    .print_cmd, .print_addr, .print_data, .printing
  );

  // The conversion must be finished when the BCD stage loads.
  property p_conv_done_in_time;
    @(posedge clk) disable iff (rst) cycle_end |-> !conv_busy;
  endproperty
  a_conv_done_in_time: assert property (p_conv_done_in_time);

  logic unused;
  assign unused = conv_done;

endmodule
