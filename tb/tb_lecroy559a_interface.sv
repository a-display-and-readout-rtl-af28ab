// Testbench for lecroy559a_interface: words with blanked digits are strobed
// in; the stored word must be positive true with code 10 turned into 0 and
// must hold between strobes; clock follows the strobe and reset the BCD reset.
module tb_lecroy559a_interface;
  import scaler_pkg::*;
  bcd_bus_t bcd;
  bcd_data_t lc_data, expect_d;
  logic lc_clock, lc_reset;
  int checks = 0, failures = 0;

  lecroy559a_interface dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bcd = BCD_RELEASED;
    #10;
    for (int k = 0; k < 200; k++) begin
      bcd_data_t w;
      for (int d = 0; d < 8; d++) w[d] = 4'($urandom_range(0, 10));
      for (int d = 0; d < 8; d++) expect_d[d] = (w[d] == 10) ? 4'd0 : w[d];
      bcd.data_n = ~w;
      bcd.reset_n = !(k % 20 == 0);
      #5;
      checks++;
      if (lc_reset != (k % 20 == 0)) begin failures++; $display("reset"); end
      #50;
      bcd.strobe_n = 0;
      #1;
      checks++;
      if (!lc_clock) begin failures++; $display("clock"); end
      #9;
      bcd.strobe_n = 1;
      #1;
      checks++;
      if (lc_clock || lc_data != expect_d) begin
        failures++; $display("word %h expected %h", lc_data, expect_d);
      end
      // bus changes again without a strobe: stored word must hold
      bcd.data_n = ~bcd.data_n;
      #5;
      checks++;
      if (lc_data != expect_d) begin failures++; $display("word did not hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
