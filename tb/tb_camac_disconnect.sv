// Testbench for camac_disconnect: with the computer's disable line released
// nothing crosses except disable and L; with it asserted the computer's
// commands reach the scaler segment and Q, L and read data come back.
module tb_camac_disconnect;
  import scaler_pkg::*;
  camac_cmd_t  comp_cmd, sys_drv;
  camac_resp_t comp_drv, sys_resp;
  logic unified;
  int checks = 0, failures = 0;

  camac_disconnect dut (.*);

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
    for (int k = 0; k < 500; k++) begin
      comp_cmd = camac_cmd_t'({$urandom, $urandom});
      comp_cmd.disable_n = k[0];
      sys_resp = camac_resp_t'($urandom);
      #1;
      if (!k[0]) begin
        chk(unified, "unified");
        chk(sys_drv == comp_cmd, "commands pass");
        chk(comp_drv == sys_resp, "responses pass");
      end else begin
        camac_cmd_t exp_cmd;
        exp_cmd = CMD_RELEASED;
        chk(!unified, "apart");
        chk(sys_drv == exp_cmd, "scaler segment released");
        chk(comp_drv.q_n && comp_drv.r_n == '1, "computer segment released");
        chk(comp_drv.l_n == sys_resp.l_n, "L passes");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
