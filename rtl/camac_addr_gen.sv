// Sequential CAMAC address generator with Q-scan.
//
// Holds the crate, station (N) and subaddress (A) that the master controller
// puts on the CAMAC bus. At the end of each read cycle the controller pulses
// `advance` together with the Q response of the address just read:
//   Q = 1 and A < 15 : the next subaddress of the same station is read;
//   Q = 0 or A = 15  : A returns to 0 and the next station is read.
// So a module answers Q = 1 for as many channels as it has, and an empty
// station or the first missing channel moves the scan on. With Q held at 1
// every station is read as a 16-channel module. After the last station of
// the last crate the scan returns to crate 0, station FIRST_N, and `wrap`
// pulses for one clock. Crates are numbered 0..NUM_CRATES-1 because crate
// address 7 means "all crates" on this bus; that numbering, the A = 15 limit
// and the station range 1..23 are choices of this design.
// Timing: registered, updates on the clock edge where `advance` is 1.
module camac_addr_gen
  import scaler_pkg::*;
#(
  parameter int unsigned NUM_CRATES = 7,
  parameter int unsigned FIRST_N    = 1,
  parameter int unsigned LAST_N     = NUM_STATIONS
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               advance,
  input  logic               q,
  output logic [CRATE_W-1:0] crate,
  output logic [N_W-1:0]     n,
  output logic [A_W-1:0]     a,
  output logic               wrap
);

  localparam logic [CRATE_W-1:0] LAST_CRATE = CRATE_W'(NUM_CRATES - 1);
  localparam logic [N_W-1:0]     N_FIRST    = N_W'(FIRST_N);
  localparam logic [N_W-1:0]     N_LAST     = N_W'(LAST_N);

  always_ff @(posedge clk) begin
    if (rst) begin
      crate <= '0;
      n     <= N_FIRST;
      a     <= '0;
      wrap  <= 1'b0;
    end else begin
      wrap <= 1'b0;
      if (advance) begin
        if (q && a != '1) begin
          a <= a + 1'b1;
        end else begin
          a <= '0;
          if (n != N_LAST) begin
            n <= n + 1'b1;
          end else begin
            n <= N_FIRST;
            if (crate != LAST_CRATE) begin
              crate <= crate + 1'b1;
            end else begin
              crate <= '0;
              wrap  <= 1'b1;
            end
          end
        end
      end
    end
  end

  initial begin
    assert (NUM_CRATES >= 1 && NUM_CRATES <= 7)
      else $error("NUM_CRATES must be 1..7: crate address 7 addresses all crates");
    assert (FIRST_N >= 1 && LAST_N <= NUM_STATIONS && FIRST_N <= LAST_N)
      else $error("station range must lie within 1..23");
  end

endmodule
