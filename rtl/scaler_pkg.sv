// Shared types and constants of the CAMAC scaler display and readout system.
//
// Two cables tie the system together. The CAMAC bus runs from the master
// controller (and, through the disconnect unit, a computer) to the crate
// controllers; the BCD bus runs from the master controller to every readout
// unit. Both cables are negative true: a line at 0 is asserted. Every driver
// on either cable is open collector, so each unit produces a full bus struct
// with the lines it does not drive left at 1 (released) and the net is the
// bitwise AND of all drivers. Receivers see the net. The field names carry
// an _n suffix to make the polarity visible.
//
// Inside a crate the Dataway is modelled in positive logic (1 = asserted).
// That is a modelling choice; the crate controller does the conversion.
package scaler_pkg;

  // CAMAC bus widths: 3 crate lines, 5 station lines, 4 subaddress lines,
  // 5 function lines and 24 shared read/write lines.
  localparam int unsigned CRATE_W = 3;
  localparam int unsigned N_W     = 5;
  localparam int unsigned A_W     = 4;
  localparam int unsigned F_W     = 5;
  localparam int unsigned DATA_W  = 24;

  // Broadcast addresses on the CAMAC bus.
  localparam logic [CRATE_W-1:0] CRATE_ALL = 3'd7;
  localparam logic [N_W-1:0]     N_ALL     = 5'd31;

  // Normal Dataway stations are 1..23.
  localparam int unsigned NUM_STATIONS = 23;

  // CAMAC function codes used by the system.
  localparam logic [F_W-1:0] F_READ      = 5'd0;
  localparam logic [F_W-1:0] F_TEST_INCR = 5'd25;

  // BCD bus: 3 address digits (channels 1..1000), 8 data digits.
  localparam int unsigned ADDR_DIGITS = 3;
  localparam int unsigned DATA_DIGITS = 8;

  // BCD code 10 blanks a digit (leading zero suppression).
  localparam logic [3:0] BCD_BLANK = 4'd10;

  typedef logic [3:0] bcd_digit_t;
  typedef bcd_digit_t [ADDR_DIGITS-1:0] bcd_addr_t;   // [0] = units
  typedef bcd_digit_t [DATA_DIGITS-1:0] bcd_data_t;   // [0] = units

  // CAMAC bus, all lines negative true. The bus has 24 read/write lines that
  // carry read data from the crates or write data from a computer, as the
  // function code decides. They are modelled as two directional groups, w_n
  // in the command part and r_n in the response part, so that a driver never
  // reads the net it drives. Command lines come from the master controller
  // or the computer; response lines come from the crate controllers.
  typedef struct packed {
    logic [CRATE_W-1:0] crate_n;
    logic [N_W-1:0]     n_n;
    logic [A_W-1:0]     a_n;
    logic [F_W-1:0]     f_n;
    logic               s1_n;
    logic               s2_n;
    logic               z_n;
    logic               c_n;
    logic               i_n;
    logic [DATA_W-1:0]  w_n;
    logic               disable_n;
  } camac_cmd_t;

  typedef struct packed {
    logic              q_n;
    logic              l_n;
    logic [DATA_W-1:0] r_n;
  } camac_resp_t;

  localparam camac_cmd_t  CMD_RELEASED  = '1;
  localparam camac_resp_t RESP_RELEASED = '1;

  // BCD bus, all lines negative true.
  typedef struct packed {
    bcd_addr_t addr_n;
    bcd_data_t data_n;
    logic      strobe_n;
    logic      reset_n;
    logic      enable_n;   // common enable: every readout channel loads
  } bcd_bus_t;

  localparam bcd_bus_t BCD_RELEASED = '1;

  // Dataway of one crate, commands from the crate controller (positive).
  typedef struct packed {
    logic [NUM_STATIONS:1] n;
    logic [A_W-1:0]        a;
    logic [F_W-1:0]        f;
    logic                  s1;
    logic                  s2;
    logic                  z;
    logic                  c;
    logic                  i;
    logic [DATA_W-1:0]     w;
  } dataway_cmd_t;

  // Dataway of one crate, responses of the stations (positive, wired OR).
  typedef struct packed {
    logic [DATA_W-1:0]     r;
    logic                  q;
    logic [NUM_STATIONS:1] l;
  } dataway_resp_t;

  // Read functions are F0..F7, write functions F16..F23.
  function automatic logic is_read(input logic [F_W-1:0] f);
    return f inside {[5'd0:5'd7]};
  endfunction

  function automatic logic is_write(input logic [F_W-1:0] f);
    return f inside {[5'd16:5'd23]};
  endfunction

endpackage
