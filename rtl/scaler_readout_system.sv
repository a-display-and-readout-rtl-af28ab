// Display and readout system for CAMAC scalers: the whole system.
//
// One master controller scans up to seven crates of CAMAC scalers over the
// CAMAC bus and sends every channel, as 8 BCD digits with a 3-digit BCD
// channel number, over the BCD bus to any number of readouts. This top holds
//   - the master controller (scan, conversion, timing, printer interface);
//   - the disconnect unit, which joins a computer's CAMAC bus to the scaler
//     bus only while the computer asserts the disable line;
//   - NUM_CRATES crate controllers, crate numbers 0..NUM_CRATES-1;
//   - a verification module in crate VERIF_CRATE, station VERIF_STATION;
//   - NUM_QUADS quad display units, a LeCroy 559A interface and NUM_PRESETS
//     preset units on the BCD bus, each with its own channel and count.
// Both buses are negative true with open-collector drivers; a bus net is the
// AND of its drivers. The scalers themselves, the computer, the printer and
// the display generator are outside: each crate's Dataway, the computer's
// bus segment, the printer and generator connections are ports.
// All logic runs on `clk` (1 MHz: one tick = 1 us) except the readout
// latches, which load on the BCD strobe as the real units do.
// From the original system: the units and how they connect. This design's choices: crate
// numbering from 0, the verification module's slot, the 1 MHz clock, two
// preset units by default (the original allows several without a number).
module scaler_readout_system
  import scaler_pkg::*;
#(
  parameter int unsigned NUM_CRATES    = 7,
  parameter int unsigned NUM_QUADS     = 4,
  parameter int unsigned NUM_PRESETS   = 2,
  parameter int unsigned CYCLE_TICKS   = 600,
  parameter int unsigned VERIF_CRATE   = 0,
  parameter int unsigned VERIF_STATION = 23
) (
  input  logic                                clk,
  input  logic                                rst,
  // crates: Dataway of each crate and its front-panel gate and clear inputs
  output dataway_cmd_t  [NUM_CRATES-1:0]      dw_cmd,
  input  dataway_resp_t [NUM_CRATES-1:0]      dw_resp,
  input  logic          [NUM_CRATES-1:0]      crate_gate,
  input  logic          [NUM_CRATES-1:0]      crate_clear,
  input  logic          [DATA_W-1:0]          verif_switches,
  // computer CAMAC bus segment
  input  camac_cmd_t                          comp_cmd,
  output camac_resp_t                         comp_resp,
  output logic                                unified,
  // master controller front panel
  input  logic                                test_mode,
  input  logic                                test_pulse,
  input  logic                                reset_all,
  input  logic                                inhibit_all,
  input  logic                                zero_suppress,
  input  logic                                display_test,
  // printer
  input  logic                                print_req,
  input  logic                                printer_busy,
  output logic                                print_cmd,
  output bcd_addr_t                           print_addr,
  output bcd_data_t                           print_data,
  output logic                                printing,
  // BCD bus as seen by the readouts
  output bcd_bus_t                            bcd_bus,
  // quad displays
  input  bcd_addr_t [NUM_QUADS-1:0][3:0]      thumbwheel,
  output bcd_data_t [NUM_QUADS-1:0][3:0]      shown,
  output logic [NUM_QUADS-1:0][3:0][DATA_DIGITS-1:0][9:0] cathode,
  // LeCroy 559A display generator
  output bcd_data_t                           lc_data,
  output logic                                lc_clock,
  output logic                                lc_reset,
  // preset units
  input  bcd_addr_t  [NUM_PRESETS-1:0]        preset_channel,
  input  logic       [NUM_PRESETS-1:0][3:0]   preset_mult,
  input  logic       [NUM_PRESETS-1:0][2:0]   preset_exponent,
  input  logic       [NUM_PRESETS-1:0]        preset_reset,
  output logic       [NUM_PRESETS-1:0]        preset_reached,
  output logic       [NUM_PRESETS-1:0]        preset_gate,
  output logic       [NUM_PRESETS-1:0]        preset_gate_n
);

  // ---- CAMAC bus, scaler segment -------------------------------------------
  camac_cmd_t  master_cmd_drv, disc_cmd_drv, sys_cmd;
  camac_resp_t sys_resp;
  camac_resp_t [NUM_CRATES-1:0] crate_resp_drv;
  dataway_resp_t [NUM_CRATES-1:0] dw_resp_all;

  assign sys_cmd = master_cmd_drv & disc_cmd_drv;

  always_comb begin
    sys_resp = RESP_RELEASED;
    for (int c = 0; c < NUM_CRATES; c++) sys_resp &= crate_resp_drv[c];
  end

  camac_disconnect u_disconnect (
    .comp_cmd, .comp_drv(comp_resp), .sys_drv(disc_cmd_drv),
    .sys_resp, .unified
  );

  master_controller #(.NUM_CRATES(NUM_CRATES), .CYCLE_TICKS(CYCLE_TICKS)) u_master (
    .clk, .rst,
    .cmd_drv(master_cmd_drv), .disable_n(disc_cmd_drv.disable_n), .resp(sys_resp),
    .bcd_drv(bcd_bus),
    .test_mode, .test_pulse, .reset_all, .inhibit_all, .zero_suppress, .display_test,
    .print_req, .printer_busy, .print_cmd, .print_addr, .print_data, .printing
  );

  // ---- crates ---------------------------------------------------------------
  logic [DATA_W-1:0] verif_r;
  logic              verif_q;

  for (genvar c = 0; c < NUM_CRATES; c++) begin : g_crate
    crate_controller #(.CRATE_NUM(CRATE_W'(c))) u_cc (
      .cmd(sys_cmd), .resp_drv(crate_resp_drv[c]),
      .dw_cmd(dw_cmd[c]), .dw_resp(dw_resp_all[c]),
      .gate_in(crate_gate[c]), .clear_in(crate_clear[c])
    );
    if (c == VERIF_CRATE) begin : g_verif
      always_comb begin
        dw_resp_all[c]   = dw_resp[c];
        dw_resp_all[c].r = dw_resp[c].r | verif_r;
        dw_resp_all[c].q = dw_resp[c].q | verif_q;
      end
    end else begin : g_plain
      assign dw_resp_all[c] = dw_resp[c];
    end
  end

  verification_module u_verif (
    .n_sel(dw_cmd[VERIF_CRATE].n[VERIF_STATION]),
    .a(dw_cmd[VERIF_CRATE].a), .f(dw_cmd[VERIF_CRATE].f), .c(dw_cmd[VERIF_CRATE].c),
    .switches(verif_switches), .r(verif_r), .q(verif_q)
  );

  // ---- BCD bus readouts -----------------------------------------------------
  for (genvar u = 0; u < NUM_QUADS; u++) begin : g_quad
    quad_display u_quad (
      .bcd(bcd_bus), .thumbwheel(thumbwheel[u]), .shown(shown[u]), .cathode(cathode[u])
    );
  end

  lecroy559a_interface u_lecroy (.bcd(bcd_bus), .lc_data, .lc_clock, .lc_reset);

  for (genvar p = 0; p < NUM_PRESETS; p++) begin : g_preset
    preset_unit u_preset (
      .bcd(bcd_bus), .channel(preset_channel[p]), .mult(preset_mult[p]),
      .exponent(preset_exponent[p]), .preset_reset(preset_reset[p]),
      .reached(preset_reached[p]), .gate(preset_gate[p]), .gate_n(preset_gate_n[p])
    );
  end

  initial begin
    assert (VERIF_CRATE < NUM_CRATES && VERIF_STATION >= 1 && VERIF_STATION <= NUM_STATIONS)
      else $error("verification module slot outside the crates");
  end

endmodule
