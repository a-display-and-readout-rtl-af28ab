// Workload testbench: an experiment with 20 display channels equal to its 20
// scaler channels, in one crate. Four quad scaler models in stations 1..4 and
// the verification module in station 23 give channels 1..20; five quad
// display units (NUM_QUADS = 5) show them. Checks:
//   - all 20 display channels show their scaler word after a scan, and follow
//     new counts in the next scan;
//   - the scan period is (23 stations + 20 channels) x 600 us = 25.8 ms,
//     i.e. 38.8 scans per second, inside the 30-60 refreshes per second the
//     system aims for.
module tb_workload_display_channels;
  import scaler_pkg::*;

  localparam int NC = 1, NQ = 5, CYC = 600, SCAN = (23 + 20) * CYC;

  logic clk = 0, rst = 1;
  dataway_cmd_t  [NC-1:0] dw_cmd;
  dataway_resp_t [NC-1:0] dw_resp;
  logic [NC-1:0] crate_gate = '0, crate_clear = '0;
  logic [23:0] verif_switches = 24'd654321;
  camac_cmd_t  comp_cmd = CMD_RELEASED;
  camac_resp_t comp_resp;
  logic unified;
  logic test_mode = 0, test_pulse = 0, reset_all = 0, inhibit_all = 0;
  logic zero_suppress = 1, display_test = 0;
  logic print_req = 0, printer_busy = 0, print_cmd, printing;
  bcd_addr_t print_addr;
  bcd_data_t print_data;
  bcd_bus_t bcd_bus;
  bcd_addr_t [NQ-1:0][3:0] thumbwheel;
  bcd_data_t [NQ-1:0][3:0] shown;
  logic [NQ-1:0][3:0][7:0][9:0] cathode;
  bcd_data_t lc_data;
  logic lc_clock, lc_reset;
  localparam int NP = 2;
  bcd_addr_t [NP-1:0] preset_channel = '0;
  logic [NP-1:0][3:0] preset_mult = {NP{4'd9}};
  logic [NP-1:0][2:0] preset_exponent = {NP{3'd7}};
  logic [NP-1:0] preset_reset = '1, preset_reached, preset_gate, preset_gate_n;

  scaler_readout_system #(.NUM_CRATES(NC), .NUM_QUADS(NQ)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  logic [3:0] cnt_in [4];
  logic [23:0] cnt [4][4];
  dataway_resp_t sresp [4];
  for (genvar s = 0; s < 4; s++) begin : g_sc
    logic [23:0] c4 [4];
    camac_scaler_model #(.CHANNELS(4)) u_sc (
      .clk, .n_sel(dw_cmd[0].n[s + 1]), .dw(dw_cmd[0]), .count_in(cnt_in[s]),
      .r(sresp[s].r), .q(sresp[s].q), .count(c4)
    );
    always_comb for (int k = 0; k < 4; k++) cnt[s][k] = c4[k];
    assign sresp[s].l = '0;
  end
  always_comb begin
    dw_resp = '0;
    for (int s = 0; s < 4; s++) begin
      dw_resp[0].r |= sresp[s].r;
      dw_resp[0].q |= sresp[s].q;
    end
  end

  function automatic logic [23:0] value_of(int ch);   // 1..20
    int k;
    k = (ch - 1) % 4;
    if (ch > 16) return k == 0 ? 24'd0 : k == 1 ? 24'hFFFFFF : verif_switches;
    return cnt[(ch - 1) / 4][k];
  endfunction

  function automatic bcd_data_t word(logic [23:0] v);
    bcd_data_t r;
    int unsigned x;
    logic lead;
    x = v;
    for (int d = 0; d < 8; d++) begin r[d] = 4'(x % 10); x /= 10; end
    lead = 1;
    for (int d = 7; d > 0; d--) begin
      if (r[d] != 0) lead = 0;
      if (lead) r[d] = 4'd10;
    end
    return r;
  endfunction

  task automatic check_all(input string when);
    for (int q = 0; q < NQ; q++)
      for (int c = 0; c < 4; c++)
        chk(shown[q][c] == word(value_of(q * 4 + c + 1)),
            $sformatf("%s: display channel %0d", when, q * 4 + c + 1));
  endtask

  longint tick = 0, last_reset = -1;
  int periods = 0, resets = 0;
  always @(posedge clk) tick <= tick + 1;
  // the first interval runs from the power-up reset and is not a full scan
  always @(posedge lc_reset) begin
    resets++;
    if (resets >= 3) begin
      periods++;
      chk(tick - last_reset == SCAN, $sformatf("scan period %0d us", tick - last_reset));
      chk(1.0e6 / real'(tick - last_reset) >= 30.0 && 1.0e6 / real'(tick - last_reset) <= 60.0,
          "scan rate within 30-60 per second");
    end
    last_reset = tick;
  end

  initial begin : watchdog
    repeat (10 * SCAN) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < NQ; q++)
      for (int c = 0; c < 4; c++) begin
        int ch;
        ch = q * 4 + c + 1;
        thumbwheel[q][c] = '{4'd0, 4'(ch / 10), 4'(ch % 10)};
      end
    for (int s = 0; s < 4; s++) cnt_in[s] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    preset_reset = '0;
    for (int t = 0; t < 2000; t++) begin
      for (int s = 0; s < 4; s++)
        for (int k = 0; k < 4; k++) cnt_in[s][k] = (t % (1 + s * 4 + k) == 0);
      @(negedge clk);
    end
    for (int s = 0; s < 4; s++) cnt_in[s] = '0;
    repeat (2 * SCAN + 3 * CYC) @(negedge clk);
    check_all("first");
    for (int t = 0; t < 500; t++) begin
      for (int s = 0; s < 4; s++) cnt_in[s] = 4'(t);
      @(negedge clk);
    end
    for (int s = 0; s < 4; s++) cnt_in[s] = '0;
    repeat (SCAN + 3 * CYC) @(negedge clk);
    check_all("second");
    chk(periods >= 2, "scan periods measured");
    $display("scan period %0d us, %0d periods", SCAN, periods);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
