// Testbench for camac_addr_gen: a small scan (2 crates, stations 1..3) with a
// fixed Q map is compared step by step with a software Q-scan.
module tb_camac_addr_gen;
  import scaler_pkg::*;
  logic clk = 0, rst = 1, advance = 0, q = 0;
  logic [CRATE_W-1:0] crate;
  logic [N_W-1:0] n;
  logic [A_W-1:0] a;
  logic wrap;
  int checks = 0, failures = 0, wraps = 0;

  camac_addr_gen #(.NUM_CRATES(2), .FIRST_N(1), .LAST_N(3)) dut (.*);

  always #5 clk = ~clk;

  // Q map: crate 0 station 2 has 4 channels, crate 1 station 1 answers Q always.
  function automatic logic qmap(int c, int s, int sa);
    if (c == 0 && s == 2) return sa < 4;
    if (c == 1 && s == 1) return 1'b1;
    return 1'b0;
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ec, es, ea;
    repeat (2) @(posedge clk);
    rst <= 0;
    ec = 0; es = 1; ea = 0;
    for (int step = 0; step < 3 * 25; step++) begin
      @(negedge clk);
      checks++;
      if (crate != ec[2:0] || n != es[4:0] || a != ea[3:0]) begin
        failures++;
        $display("step %0d: got %0d/%0d/%0d expected %0d/%0d/%0d", step, crate, n, a, ec, es, ea);
      end
      q = qmap(ec, es, ea);
      advance = 1;
      @(negedge clk);
      advance = 0;
      if (wrap) wraps++;
      // software Q-scan
      if (q && ea != 15) ea++;
      else begin
        ea = 0;
        if (es != 3) es++;
        else begin
          es = 1;
          ec = (ec == 1) ? 0 : ec + 1;
          if (ec == 0) begin
            checks++;
            if (!wrap) begin failures++; $display("missing wrap"); end
          end
        end
      end
    end
    checks++;
    if (wraps != 3) begin failures++; $display("wraps=%0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
