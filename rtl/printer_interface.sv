// Printer interface of the master controller (HP562A / HP5050B style).
//
// Prints a hard copy of one whole scan, one line per channel: BCD channel
// address and 8 BCD data digits. The scan never waits for the printer, so
// the interface follows the BCD bus and takes one channel per pass:
//   IDLE   -> a rising edge on `print_req` arms it;
//   ARM    -> waits for the BCD reset that starts a scan; target = 001;
//   SEARCH -> at each BCD strobe compares the bus address with the target;
//             on a match it latches address and data;
//   CMD    -> holds `print_cmd` until the printer raises `printer_busy`;
//   WAIT   -> waits for `printer_busy` to fall, then target + 1, SEARCH.
// If two BCD resets pass in SEARCH without the target showing up, the list is
// complete and the interface returns to IDLE. A channel is thus printed within
// one scan of the previous one finishing. The original system only names this unit;
// the sequence and the busy handshake are this design's choices.
// Inputs are the master controller's internal, positive-true BCD signals
// (`strobe` and `bcd_reset` are one-clock pulses).
module printer_interface
  import scaler_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      print_req,
  input  logic      strobe,
  input  logic      bcd_reset,
  input  bcd_addr_t addr,
  input  bcd_data_t data,
  input  logic      printer_busy,
  output logic      print_cmd,
  output bcd_addr_t print_addr,
  output bcd_data_t print_data,
  output logic      printing
);

  typedef enum logic [2:0] {IDLE, ARM, SEARCH, CMD, WAIT} state_t;

  state_t    state;
  bcd_addr_t target;
  logic [1:0] resets_seen;
  logic      req_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= IDLE;
      target      <= '{default: 4'd0};
      resets_seen <= '0;
      req_d       <= 1'b0;
      print_addr  <= '{default: 4'd0};
      print_data  <= '{default: 4'd0};
    end else begin
      req_d <= print_req;
      unique case (state)
        IDLE: if (print_req && !req_d) state <= ARM;
        ARM: if (bcd_reset) begin
          target      <= '{default: 4'd0};
          target[0]   <= 4'd1;
          resets_seen <= '0;
          state       <= SEARCH;
        end
        SEARCH: begin
          if (strobe && addr == target) begin
            print_addr <= addr;
            print_data <= data;
            state      <= CMD;
          end else if (bcd_reset) begin
            if (resets_seen == 2'd1) state <= IDLE;
            else                     resets_seen <= resets_seen + 1'b1;
          end
        end
        CMD: if (printer_busy) state <= WAIT;
        WAIT: if (!printer_busy) begin
          target      <= bcd_inc(target);
          resets_seen <= '0;
          state       <= SEARCH;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign print_cmd = (state == CMD);
  assign printing  = (state != IDLE);

  function automatic bcd_addr_t bcd_inc(input bcd_addr_t v);
    bcd_addr_t r;
    logic carry;
    r = v;
    carry = 1'b1;
    for (int d = 0; d < ADDR_DIGITS; d++) begin
      if (carry) begin
        if (v[d] == 4'd9) r[d] = 4'd0;
        else begin
          r[d]  = v[d] + 4'd1;
          carry = 1'b0;
        end
      end
    end
    return r;
  endfunction

endmodule
