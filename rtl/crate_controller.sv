// Minimal crate controller: joins one CAMAC crate's Dataway to the CAMAC bus.
//
// A purely combinational repeater, with no flip-flops or timing elements.
// Receivers take the negative-true bus lines; the crate is selected when the
// bus crate address equals CRATE_NUM or is 7 (all crates). In a selected
// crate the 5-bit station address is decoded onto the individual N lines of
// stations 1..23, and station address 31 raises all of them. A, F, S1 and S2
// are repeated to the Dataway. Z, C and I are repeated to every crate,
// selected or not, so a reset or inhibit reaches all channels. Read data (F0-
// F7) and Q of a selected crate are driven back onto the bus through open-
// collector drivers; write data (F16-F23) goes from the bus to the Dataway W
// lines. All L lines are ORed into one L demand on the bus, whether or not
// the crate is selected. Two front-panel inputs are added: `gate_in` drives I
// and `clear_in` drives C and S2 together.
// This structure is the original one; A, F, S1 and S2 are left
// ungated (stations act only on their own N line) by this design's choice.
module crate_controller
  import scaler_pkg::*;
#(
  parameter logic [CRATE_W-1:0] CRATE_NUM = 3'd0
) (
  input  camac_cmd_t    cmd,       // bus command lines (net)
  output camac_resp_t   resp_drv,  // this crate's open-collector drive
  output dataway_cmd_t  dw_cmd,
  input  dataway_resp_t dw_resp,
  input  logic          gate_in,
  input  logic          clear_in
);

  logic [CRATE_W-1:0] crate;
  logic [N_W-1:0]     n;
  logic [F_W-1:0]     f;
  logic               sel;

  always_comb begin
    crate = ~cmd.crate_n;
    n     = ~cmd.n_n;
    f     = ~cmd.f_n;
    sel   = (crate == CRATE_NUM) || (crate == CRATE_ALL);

    for (int s = 1; s <= NUM_STATIONS; s++) begin
      dw_cmd.n[s] = sel && (n == N_W'(s) || n == N_ALL);
    end
    dw_cmd.a  = ~cmd.a_n;
    dw_cmd.f  = f;
    dw_cmd.s1 = !cmd.s1_n;
    dw_cmd.s2 = !cmd.s2_n || clear_in;
    dw_cmd.z  = !cmd.z_n;
    dw_cmd.c  = !cmd.c_n || clear_in;
    dw_cmd.i  = !cmd.i_n || gate_in;
    dw_cmd.w  = (sel && is_write(f)) ? ~cmd.w_n : '0;

    resp_drv     = RESP_RELEASED;
    resp_drv.l_n = !(|dw_resp.l);
    if (sel) begin
      resp_drv.q_n = !dw_resp.q;
      if (is_read(f)) resp_drv.r_n = ~dw_resp.r;
    end
  end

endmodule
