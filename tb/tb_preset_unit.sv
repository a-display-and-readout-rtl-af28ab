// Testbench for preset_unit: for random presets M x 10^E on channel 42, a
// rising count is sent on channel 42 among words for other channels. The
// preset must trip at the first strobe of channel 42 whose count is at least
// M x 10^E (with leading zeros blanked as code 10), never on other channels,
// hold until reset, and drive gate/gate_n in both senses.
module tb_preset_unit;
  import scaler_pkg::*;
  bcd_bus_t bcd;
  bcd_addr_t channel;
  logic [3:0] mult;
  logic [2:0] exponent;
  logic preset_reset, reached, gate, gate_n;
  int checks = 0, failures = 0;

  preset_unit dut (.*);

  function automatic bcd_data_t to_bcd_zs(longint v);
    bcd_data_t r;
    logic lead;
    for (int d = 0; d < 8; d++) begin r[d] = 4'(v % 10); v /= 10; end
    lead = 1;
    for (int d = 7; d > 0; d--) begin
      if (r[d] != 0) lead = 0;
      if (lead) r[d] = 4'd10;
    end
    return r;
  endfunction

  task automatic send(input int ch, input longint v);
    bcd_addr_t a;
    for (int d = 0; d < 3; d++) begin a[d] = 4'(ch % 10); ch /= 10; end
    bcd.addr_n = ~a;
    bcd.data_n = ~to_bcd_zs(v);
    #50;
    bcd.strobe_n = 0;
    #10;
    bcd.strobe_n = 1;
    #5;
  endtask

  initial begin : watchdog
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bcd = BCD_RELEASED;
    channel = '{4'd0, 4'd4, 4'd2};    // 042
    for (int k = 0; k < 40; k++) begin
      longint preset, count;
      int steps;
      mult = 4'($urandom_range(1, 9));
      exponent = 3'($urandom_range(0, 6));
      preset = longint'(mult) * (10 ** exponent);
      preset_reset = 1; #5; preset_reset = 0; #5;
      checks++;
      if (reached || !gate || gate_n) begin failures++; $display("not cleared"); end
      count = 0;
      steps = 0;
      while (count < preset + preset / 2 + 5) begin
        // another channel showing a large count must not trip it
        send(41, 99999999);
        count += 1 + preset / 16;
        send(42, count);
        checks++;
        if (reached != (count >= preset) || gate == reached || gate_n != reached) begin
          failures++;
          $display("M=%0d E=%0d count %0d: reached=%0d", mult, exponent, count, reached);
        end
        steps++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
