// Testbench for verification_module: every subaddress and function with the
// station addressed or not and clear on or off, against the table of known
// codes (A0 zeros, A1 ones, A2/A3 switches, Q only for A0..A3 reads).
module tb_verification_module;
  import scaler_pkg::*;
  logic n_sel, c;
  logic [3:0] a;
  logic [4:0] f;
  logic [23:0] switches, r, er;
  logic q, eq;
  int checks = 0, failures = 0;

  verification_module dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4096; k++) begin
      n_sel = k[0]; c = k[1]; a = k[5:2]; f = 5'(k[11:6] % 32);
      switches = $urandom;
      #1;
      eq = n_sel && f <= 7 && a < 4;
      er = !eq || c ? 24'd0 : a == 0 ? 24'd0 : a == 1 ? 24'hFFFFFF : switches;
      checks++;
      if (q != eq || r != er) begin
        failures++;
        $display("n=%0d c=%0d a=%0d f=%0d: q=%0d r=%h expected %0d %h", n_sel, c, a, f, q, r, eq, er);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
