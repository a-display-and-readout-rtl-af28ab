// Testbench for bcd_zero_suppress: words with different numbers of leading
// zeros, with suppression on and off, against a digit-by-digit reference.
module tb_bcd_zero_suppress;
  import scaler_pkg::*;
  logic enable;
  logic [7:0][3:0] din, dout, expect_d;
  int checks = 0, failures = 0;

  bcd_zero_suppress dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 400; k++) begin
      int lead;
      enable = k[0];
      lead = k % 9;                       // number of zero digits at the top
      for (int d = 0; d < 8; d++)
        din[d] = (d >= 8 - lead) ? 4'd0 : 4'($urandom_range(0, 9));
      #1;
      begin
        logic seen;
        seen = 1'b0;
        for (int d = 7; d >= 0; d--) begin
          if (din[d] != 0) seen = 1'b1;
          expect_d[d] = (enable && !seen && d != 0) ? 4'd10 : din[d];
        end
      end
      checks++;
      if (dout != expect_d) begin
        failures++;
        $display("din=%h en=%0d dout=%h expected %h", din, enable, dout, expect_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
