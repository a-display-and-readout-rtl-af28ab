// Testbench for bin2bcd_serial: edge values and random 24-bit words are
// converted and compared with decimal digits computed by division; the
// latency from start to done must be 24 clocks.
module tb_bin2bcd_serial;
  import scaler_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  logic [23:0] bin;
  logic busy, done;
  logic [7:0][3:0] bcd;
  int checks = 0, failures = 0;

  bin2bcd_serial dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic convert(input logic [23:0] v);
    int lat;
    int unsigned x;
    @(negedge clk);
    bin = v; start = 1;
    @(negedge clk);
    start = 0;
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 24) begin failures++; $display("latency %0d for %0d", lat, v); end
    x = v;
    for (int d = 0; d < 8; d++) begin
      checks++;
      if (bcd[d] != 4'(x % 10)) begin
        failures++;
        $display("value %0d digit %0d: got %0d", v, d, bcd[d]);
      end
      x = x / 10;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    convert(24'd0);
    convert(24'hFFFFFF);
    convert(24'd9999999);
    convert(24'd10000000);
    convert(24'd12345678);
    convert(24'd5);
    for (int k = 0; k < 200; k++) convert(24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
