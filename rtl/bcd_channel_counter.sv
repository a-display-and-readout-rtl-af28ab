// BCD channel address counter.
//
// Counts the channel number that goes with each data word on the BCD bus, as
// three BCD digits. `clear` loads channel 001 (the first channel of a scan);
// `inc` adds one with decimal carries. Channel 1000 is shown as 000, the way
// the three thumbwheels of the readouts select it, and the count after it is
// 001 again. `clear` wins over `inc`. Registered.
module bcd_channel_counter
  import scaler_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      clear,
  input  logic      inc,
  output bcd_addr_t count
);

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      count <= '{default: 4'd0};
      count[0] <= 4'd1;
    end else if (inc) begin
      if (count == '0) begin
        count[0] <= 4'd1;                  // 1000 -> 001
      end else begin
        logic carry;
        carry = 1'b1;
        for (int d = 0; d < ADDR_DIGITS; d++) begin
          if (carry) begin
            if (count[d] == 4'd9) begin
              count[d] <= 4'd0;
            end else begin
              count[d] <= count[d] + 4'd1;
              carry = 1'b0;
            end
          end
        end
      end
    end
  end

endmodule
