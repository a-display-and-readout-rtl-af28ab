// Testbench for master_timing at its default 600-tick cycle: every output is
// compared tick by tick with the expected phase positions over three cycles,
// the strobe must end 5 ticks before the cycle ends, and with run = 0 the
// timer must stay silent and restart at tick 0.
module tb_master_timing;
  logic clk = 0, rst = 1, run = 0;
  logic s1, capture, reset_slot, strobe_slot, cycle_end;
  int checks = 0, failures = 0;

  master_timing dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_strobe, last_end;
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (20) begin
      @(negedge clk);
      checks++;
      if (s1 || capture || reset_slot || strobe_slot || cycle_end) begin
        failures++; $display("output while not running");
      end
    end
    run = 1;
    last_strobe = -1; last_end = -1;
    for (int t = 0; t < 3 * 600; t++) begin
      int k;
      k = t % 600;
      checks++;
      if (s1 != (k == 300) || capture != (k == 301) || reset_slot != (k >= 100 && k < 110) ||
          strobe_slot != (k >= 585 && k < 595) || cycle_end != (k == 599)) begin
        failures++;
        $display("tick %0d: s1=%0d cap=%0d rst=%0d strobe=%0d end=%0d", k, s1, capture,
                 reset_slot, strobe_slot, cycle_end);
      end
      if (strobe_slot) last_strobe = t;
      if (cycle_end) begin
        checks++;
        if (t - last_strobe != 5) begin failures++; $display("guard band %0d", t - last_strobe); end
        if (last_end >= 0) begin
          checks++;
          if (t - last_end != 600) begin failures++; $display("cycle length %0d", t - last_end); end
        end
        last_end = t;
      end
      @(negedge clk);
    end
    // stop mid-cycle, restart: must begin again at tick 0
    repeat (150) @(negedge clk);
    run = 0;
    @(negedge clk);
    run = 1;
    for (int t = 0; t < 302; t++) begin
      checks++;
      if (capture != (t == 301)) begin failures++; $display("restart: capture at %0d", t); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
