// Testbench for crate_controller (crate 3): random bus commands and Dataway
// responses; N decoding, crate selection (own number and 7), broadcast of
// Z/C/I, read and write gating, Q, the wired L and the front-panel inputs
// are compared with an independent reference.
module tb_crate_controller;
  import scaler_pkg::*;
  camac_cmd_t    cmd;
  camac_resp_t   resp_drv;
  dataway_cmd_t  dw_cmd;
  dataway_resp_t dw_resp;
  logic gate_in, clear_in;
  int checks = 0, failures = 0;

  crate_controller #(.CRATE_NUM(3'd3)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int k = 0; k < 2000; k++) begin
      int crate, n, f;
      logic sel;
      cmd = camac_cmd_t'({$urandom, $urandom});
      crate = (k % 3 == 0) ? 3 : (k % 3 == 1) ? 7 : $urandom_range(0, 6);
      n = (k % 7 == 0) ? 31 : $urandom_range(0, 31);
      f = (k % 2 == 0) ? 0 : $urandom_range(0, 31);
      cmd.crate_n = ~3'(crate);
      cmd.n_n = ~5'(n);
      cmd.f_n = ~5'(f);
      dw_resp = dataway_resp_t'({$urandom, $urandom});
      if (k % 5 == 0) dw_resp.l = '0;
      gate_in = $urandom_range(0, 1);
      clear_in = $urandom_range(0, 1);
      #1;
      sel = (crate == 3 || crate == 7);
      for (int s = 1; s <= 23; s++)
        chk(dw_cmd.n[s] == (sel && (n == s || n == 31)), "N line");
      chk(dw_cmd.a == ~cmd.a_n && dw_cmd.f == 5'(f), "A/F repeat");
      chk(dw_cmd.s1 == !cmd.s1_n, "S1");
      chk(dw_cmd.s2 == (!cmd.s2_n || clear_in), "S2");
      chk(dw_cmd.c == (!cmd.c_n || clear_in), "C");
      chk(dw_cmd.i == (!cmd.i_n || gate_in), "I");
      chk(dw_cmd.z == !cmd.z_n, "Z");
      chk(dw_cmd.w == ((sel && f >= 16 && f <= 23) ? ~cmd.w_n : 24'd0), "W");
      chk(resp_drv.r_n == ((sel && f <= 7) ? ~dw_resp.r : 24'hFFFFFF), "R");
      chk(resp_drv.q_n == (sel ? !dw_resp.q : 1'b1), "Q");
      chk(resp_drv.l_n == (dw_resp.l == 0), "L");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
