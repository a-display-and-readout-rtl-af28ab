// Testbench for bcd_channel_counter: 1100 increments with a clear in between,
// compared with an integer count (1..1000, 1000 shown as 000, then 001).
module tb_bcd_channel_counter;
  import scaler_pkg::*;
  logic clk = 0, rst = 1, clear = 0, inc = 0;
  bcd_addr_t count;
  int checks = 0, failures = 0;
  int model;

  bcd_channel_counter dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_count();
    int shown;
    shown = model % 1000;
    checks++;
    if (count[0] != 4'(shown % 10) || count[1] != 4'((shown / 10) % 10) || count[2] != 4'(shown / 100)) begin
      failures++;
      $display("model %0d: count %0d%0d%0d", model, count[2], count[1], count[0]);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    model = 1;
    check_count();
    for (int k = 0; k < 1100; k++) begin
      inc = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (inc) model = (model == 1000) ? 1 : model + 1;
      check_count();
      if (k == 40) begin
        clear = 1; inc = 1;
        @(negedge clk);
        clear = 0;
        model = 1;
        check_count();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
