// Workload testbench: every station of all seven crates answers Q = 1 on
// every subaddress, so the system runs as if all crates were full of
// 16-channel scalers (7 x 23 x 16 = 2576 channels). Each channel returns a
// word built from its crate, station and subaddress. One complete scan is
// followed on the BCD bus; checks:
//   - 2576 strobes per scan, each carrying the right word;
//   - channel numbers run 001..999, 000 (= 1000), then start again at 001,
//     so numbers above 1000 repeat (the 3-digit channel range);
//   - the LeCroy interface receives all 2576 words after one reset;
//   - displays set to 001, 500 and 1000 end the scan showing the last
//     channel that carried their number (channels 2001, 2500 and 2000).
module tb_workload_full_crates;
  import scaler_pkg::*;

  localparam int NC = 7, NQ = 4, CYC = 600, CH = NC * 23 * 16;

  logic clk = 0, rst = 1;
  dataway_cmd_t  [NC-1:0] dw_cmd;
  dataway_resp_t [NC-1:0] dw_resp;
  logic [NC-1:0] crate_gate = '0, crate_clear = '0;
  logic [23:0] verif_switches = 24'h0;
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

  scaler_readout_system dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  // channel k (0-based scan order) = crate k/368, station 1 + (k/16)%23, subaddress k%16
  function automatic logic [23:0] word_of(int c, int n, int a);
    return 24'(c * 100000 + n * 1000 + a * 37 + 1);
  endfunction
  function automatic logic [23:0] word_k(int k);
    return word_of(k / 368, 1 + (k / 16) % 23, k % 16);
  endfunction

  // every station answers Q = 1 on every subaddress
  always_comb begin
    for (int c = 0; c < NC; c++) begin
      dw_resp[c] = '0;
      for (int s = 1; s <= 23; s++)
        if (dw_cmd[c].n[s] && dw_cmd[c].f == F_READ) begin
          dw_resp[c].q = 1'b1;
          dw_resp[c].r = word_of(c, s, int'(dw_cmd[c].a));
        end
    end
  end

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

  function automatic bcd_addr_t baddr(int v);
    bcd_addr_t r;
    for (int d = 0; d < 3; d++) begin r[d] = 4'(v % 10); v /= 10; end
    return r;
  endfunction

  // the built-in verification module also answers A0..A3 of crate 0
  // station 23 (switch code 0); its data ORs with the word there
  function automatic logic [23:0] expect_k(int k);
    logic [23:0] v;
    v = word_k(k);
    if (k / 368 == 0 && (k / 16) % 23 == 22 && k % 16 < 4)
      v |= (k % 16 == 1) ? 24'hFFFFFF : 24'h0;
    return v;
  endfunction

  int idx = -1, lc_words = 0, resets = 0;
  logic strobe_d = 0;
  always @(posedge clk) begin
    strobe_d <= !bcd_bus.strobe_n;
    if (!bcd_bus.strobe_n && !strobe_d && idx >= 0 && idx < CH) begin
      chk(~bcd_bus.addr_n == baddr((idx + 1) % 1000), $sformatf("strobe %0d channel number", idx));
      chk(~bcd_bus.data_n == word(expect_k(idx)), $sformatf("strobe %0d data", idx));
      idx++;
    end
  end
  always @(posedge lc_reset) begin
    resets++;
    if (resets == 2) idx = 0;              // first full scan begins
    if (resets == 3) chk(lc_words == CH, $sformatf("LeCroy words %0d", lc_words));
    lc_words = 0;
  end
  always @(negedge lc_clock) lc_words++;

  initial begin : watchdog
    repeat (3 * CH * CYC) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    thumbwheel = '0;
    thumbwheel[0][0] = baddr(1);
    thumbwheel[0][1] = baddr(500);
    thumbwheel[0][2] = baddr(0);          // 1000
    thumbwheel[0][3] = baddr(999);
    repeat (3) @(negedge clk);
    rst = 0;
    preset_reset = '0;
    wait (resets == 3);
    chk(idx == CH, $sformatf("strobes in the scan: %0d", idx));
    chk(shown[0][0] == word(expect_k(2000)), "display 001 shows channel 2001");
    chk(shown[0][1] == word(expect_k(2499)), "display 500 shows channel 2500");
    chk(shown[0][2] == word(expect_k(1999)), "display 1000 shows channel 2000");
    chk(shown[0][3] == word(expect_k(1998)), "display 999 shows channel 1999");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
