// Testbench for quad_display: channels set to 5, 17, 100 and 1000 (000). A
// sequence of bus words with strobes must land only in the channel whose
// thumbwheels match, leave the others alone, drive the right cathodes and
// blank code-10 digits; the common enable must load all four channels.
module tb_quad_display;
  import scaler_pkg::*;
  bcd_bus_t bcd;
  bcd_addr_t [3:0] thumbwheel;
  bcd_data_t [3:0] shown, model;
  logic [3:0][7:0][9:0] cathode;
  int checks = 0, failures = 0;

  quad_display dut (.*);

  function automatic bcd_addr_t to_addr(int v);
    bcd_addr_t r;
    for (int d = 0; d < 3; d++) begin r[d] = 4'(v % 10); v /= 10; end
    return r;
  endfunction

  function automatic bcd_data_t rand_data();
    bcd_data_t r;
    for (int d = 0; d < 8; d++) r[d] = 4'($urandom_range(0, 10));
    return r;
  endfunction

  task automatic send(input bcd_addr_t addr, input bcd_data_t data, input logic en);
    bcd.addr_n = ~addr; bcd.data_n = ~data; bcd.enable_n = !en;
    #100;
    bcd.strobe_n = 0;
    #10;
    bcd.strobe_n = 1;
    #5;
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int chans[4];
    chans = '{5, 17, 100, 1000};
    bcd = BCD_RELEASED;
    for (int ch = 0; ch < 4; ch++) thumbwheel[ch] = to_addr(chans[ch] % 1000);
    // common enable: all channels load the same word
    begin
      bcd_data_t w;
      w = rand_data();
      send(to_addr(999), w, 1'b1);
      for (int ch = 0; ch < 4; ch++) model[ch] = w;
    end
    for (int k = 0; k < 300; k++) begin
      int ch_addr;
      bcd_data_t w;
      ch_addr = (k % 3 == 0) ? chans[$urandom_range(0, 3)] % 1000 : $urandom_range(0, 999);
      w = rand_data();
      send(to_addr(ch_addr), w, 1'b0);
      for (int ch = 0; ch < 4; ch++) if (chans[ch] % 1000 == ch_addr) model[ch] = w;
      for (int ch = 0; ch < 4; ch++) begin
        checks++;
        if (shown[ch] != model[ch]) begin
          failures++; $display("step %0d channel %0d: %h expected %h", k, ch, shown[ch], model[ch]);
        end
        for (int d = 0; d < 8; d++) begin
          checks++;
          if (cathode[ch][d] != (model[ch][d] < 10 ? 10'(1 << model[ch][d]) : 10'd0)) begin
            failures++; $display("cathodes ch %0d digit %0d", ch, d);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
