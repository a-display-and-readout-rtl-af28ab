// Disconnect unit between a computer's CAMAC bus and the scaler system's bus.
//
// The scaler system scans its own crates on its own bus segment, independent
// of a computer bus that may also hold other crates (ADCs, latches). The two
// segments are joined only while the computer asserts the disable line: then
// the computer's command lines (crate, N, A, F, S1, S2, Z, C, I and write
// data) are driven onto the scaler segment and the scaler segment's Q, L and
// read data are driven back onto the computer segment. The disable line
// itself always passes to the scaler segment, where it stops the master
// controller and releases its drivers. While the segments are apart the unit
// drives nothing. L demand is passed through always so the computer sees
// scaler LAMs. The original system gives only the purpose of this unit; the choice
// of which lines pass in which direction is this design's.
// Each side's input is the AND of the other drivers on that segment, not
// including this unit's own drive (it never reads a line it drives).
// Purely combinational, negative true.
module camac_disconnect
  import scaler_pkg::*;
(
  input  camac_cmd_t  comp_cmd,    // computer segment command lines
  output camac_resp_t comp_drv,    // drive onto the computer segment
  output camac_cmd_t  sys_drv,     // drive onto the scaler segment
  input  camac_resp_t sys_resp,    // scaler segment response lines
  output logic        unified
);

  always_comb begin
    unified  = !comp_cmd.disable_n;
    sys_drv  = CMD_RELEASED;
    comp_drv = RESP_RELEASED;
    sys_drv.disable_n = comp_cmd.disable_n;
    comp_drv.l_n      = sys_resp.l_n;
    if (unified) begin
      sys_drv  = comp_cmd;
      comp_drv = sys_resp;
    end
  end

endmodule
