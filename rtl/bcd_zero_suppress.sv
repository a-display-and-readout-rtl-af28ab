// Leading-zero suppression for the BCD data word.
//
// Scanning from the most significant digit down, every 0 digit met before the
// first non-zero digit is replaced by BCD code 10. Readouts blank a digit that
// carries code 10, so a count shows without leading zeros. The units digit is
// never replaced, so a count of zero shows "0". With `enable` low the word
// passes unchanged (suppression is a front-panel option).
// Purely combinational.
module bcd_zero_suppress
  import scaler_pkg::*;
#(
  parameter int unsigned DIGITS = DATA_DIGITS
) (
  input  logic                   enable,
  input  logic [DIGITS-1:0][3:0] din,
  output logic [DIGITS-1:0][3:0] dout
);

  always_comb begin
    logic leading;
    leading = enable;
    for (int d = DIGITS - 1; d >= 0; d--) begin
      if (leading && d != 0 && din[d] == 4'd0) begin
        dout[d] = BCD_BLANK;
      end else begin
        dout[d] = din[d];
        leading = 1'b0;
      end
    end
  end

endmodule
