// Testbench for nixie_driver_74141: all 16 input codes; 0..9 light exactly
// their own cathode, 10..15 light none.
module tb_nixie_driver_74141;
  logic [3:0] bcd;
  logic [9:0] cathode;
  int checks = 0, failures = 0;

  nixie_driver_74141 dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      bcd = 4'(k);
      #1;
      checks++;
      if (cathode != (k < 10 ? 10'(1 << k) : 10'd0)) begin
        failures++; $display("code %0d: %b", k, cathode);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
