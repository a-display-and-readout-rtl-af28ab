// Testbench for printer_interface: a synthetic BCD bus scans channels 1..5
// over and over (a BCD reset before channel 1), a printer model answers each
// print command with a busy period. The printed lines must be channels 1..5
// in order with the data of their channel, and the interface must go idle.
module tb_printer_interface;
  import scaler_pkg::*;
  logic clk = 0, rst = 1, print_req = 0, strobe = 0, bcd_reset = 0, printer_busy = 0;
  bcd_addr_t addr, print_addr;
  bcd_data_t data, print_data;
  logic print_cmd, printing;
  int checks = 0, failures = 0, lines = 0;

  printer_interface dut (.*);
  always #5 clk = ~clk;

  function automatic bcd_data_t data_of(int ch);
    bcd_data_t v;
    int x;
    x = ch * 1111 + 7;
    for (int d = 0; d < 8; d++) begin v[d] = 4'(x % 10); x /= 10; end
    return v;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bus: each channel slot is 20 clocks, strobe one clock at the end
  initial begin
    @(negedge clk);
    forever begin
      bcd_reset = 1; @(negedge clk); bcd_reset = 0;
      for (int ch = 1; ch <= 5; ch++) begin
        addr = '{default: 4'd0};
        addr[0] = 4'(ch);
        data = data_of(ch);
        repeat (18) @(negedge clk);
        strobe = 1; @(negedge clk); strobe = 0;
      end
    end
  end

  // printer: busy 150 clocks after each command
  initial begin
    forever begin
      @(posedge clk);
      if (print_cmd) begin
        lines++;
        checks += 2;
        if (print_addr[0] != 4'(lines) || print_addr[2:1] != '0) begin
          failures++; $display("line %0d printed channel %0d", lines, print_addr[0]);
        end
        if (print_data != data_of(lines)) begin
          failures++; $display("line %0d data %h", lines, print_data);
        end
        @(negedge clk) printer_busy = 1;
        repeat (150) @(negedge clk);
        printer_busy = 0;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (10) @(negedge clk);
    print_req = 1; @(negedge clk); print_req = 0;
    checks++;
    @(negedge clk);
    if (!printing) begin failures++; $display("not printing after request"); end
    wait (!printing);
    checks++;
    if (lines != 5) begin failures++; $display("printed %0d lines", lines); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
