// End-to-end testbench of scaler_readout_system at its default size: seven
// crates, four quad displays, a 600-tick (600 us) cycle. Three quad scaler
// models sit in crate 0 station 1, crate 3 station 5 and crate 6 station 23;
// the built-in verification module is in crate 0 station 23. That gives 16
// channels: 1-4, 5-8 (verification), 9-12, 13-16, and a scan of 161
// stations + 16 channels = 177 cycles. The four quad displays show channels
// 1-16. Phases:
//   1 scalers preloaded, two scans: every display digit, every LeCroy word in
//     order after its reset, blanking of leading zeros;
//   2 zero suppression off: zeros shown as digits;
//   3 display test (common enable): every channel loads one word;
//   4 test mode: 3 test pulses add 3 to every scaler channel;
//   5 inhibit: counting inputs have no effect;
//   6 reset held over a scan: scalers clear, verification data off;
//   7 front-panel clear of crate 3 only;
//   8 two presets, channel 9 at 5 x 10^1 and channel 10 at 3 x 10^1, each
//     gate stopping its own channel's input;
//   9 computer: disable, a read through the disconnect unit, scan stops;
//  10 printer: a full listing of 16 channels.
// Each mechanism is counted; one that never happens is a failure.
module tb_scaler_readout_system;
  import scaler_pkg::*;

  localparam int NC = 7, NQ = 4, NP = 2, CYC = 600, SCAN = 177 * CYC;

  logic clk = 0, rst = 1;
  dataway_cmd_t  [NC-1:0] dw_cmd;
  dataway_resp_t [NC-1:0] dw_resp;
  logic [NC-1:0] crate_gate = '0, crate_clear = '0;
  logic [23:0] verif_switches = 24'h123456;
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
  bcd_addr_t [NP-1:0] preset_channel;
  logic [NP-1:0][3:0] preset_mult = {4'd3, 4'd5};
  logic [NP-1:0][2:0] preset_exponent = {3'd1, 3'd1};
  logic [NP-1:0] preset_reset = '1, preset_reached, preset_gate, preset_gate_n;

  scaler_readout_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // ---- scalers -------------------------------------------------------------
  logic [3:0] cnt_in [3];
  logic [23:0] cnt [3][4];
  dataway_resp_t sresp [3];
  localparam int SC_CRATE[3] = '{0, 3, 6};
  localparam int SC_N[3]     = '{1, 5, 23};

  for (genvar s = 0; s < 3; s++) begin : g_sc
    logic [23:0] c4 [4];
    camac_scaler_model #(.CHANNELS(4)) u_sc (
      .clk, .n_sel(dw_cmd[SC_CRATE[s]].n[SC_N[s]]), .dw(dw_cmd[SC_CRATE[s]]),
      .count_in(cnt_in[s]), .r(sresp[s].r), .q(sresp[s].q), .count(c4)
    );
    always_comb for (int k = 0; k < 4; k++) cnt[s][k] = c4[k];
    assign sresp[s].l = '0;
  end

  always_comb begin
    dw_resp = '0;
    for (int s = 0; s < 3; s++) begin
      dw_resp[SC_CRATE[s]].r |= sresp[s].r;
      dw_resp[SC_CRATE[s]].q |= sresp[s].q;
    end
  end

  // ---- expected values ----------------------------------------------------
  function automatic logic [23:0] value_of(int ch);   // ch 1..16
    int k;
    k = (ch - 1) % 4;
    if (ch >= 5 && ch <= 8) begin
      if (reset_all) return 24'd0;
      return k == 0 ? 24'd0 : k == 1 ? 24'hFFFFFF : verif_switches;
    end
    return cnt[ch <= 4 ? 0 : ch <= 12 ? 1 : 2][k];
  endfunction

  function automatic bcd_data_t word(logic [23:0] v, logic zs);
    bcd_data_t r;
    int unsigned x;
    logic lead;
    x = v;
    for (int d = 0; d < 8; d++) begin r[d] = 4'(x % 10); x /= 10; end
    lead = zs;
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

  initial begin
    for (int q = 0; q < NQ; q++)
      for (int c = 0; c < 4; c++) thumbwheel[q][c] = baddr(q * 4 + c + 1);
    preset_channel[0] = baddr(9);
    preset_channel[1] = baddr(10);
  end

  // ---- mechanism counters -------------------------------------------------
  int n_qskip = 0, n_read = 0, n_strobe = 0, n_bcdreset = 0, n_blank = 0;
  int n_test_s1 = 0, n_inhibit = 0, n_clear = 0, n_crate_clear = 0, n_enable = 0;
  int n_disable = 0, n_comp_read = 0, n_print = 0, n_preset = 0, n_wrap = 0;
  logic s1_d = 0, strobe_d = 0, reset_d = 0;
  logic [NP-1:0] preset_d = '0;

  always @(posedge clk) begin
    s1_d     <= !dut.sys_cmd.s1_n;
    strobe_d <= !bcd_bus.strobe_n;
    reset_d  <= lc_reset;
    preset_d <= preset_reached;
    if (!dut.sys_cmd.s1_n && !s1_d) begin
      if (test_mode) n_test_s1++;
      else if (!unified) begin
        if (dut.sys_resp.q_n) n_qskip++; else n_read++;
      end
    end
    if (!bcd_bus.strobe_n && !strobe_d) begin
      n_strobe++;
      if (!bcd_bus.enable_n) n_enable++;
    end
    if (lc_reset && !reset_d) n_bcdreset++;
    for (int p = 0; p < NP; p++) if (preset_reached[p] && !preset_d[p]) n_preset++;
    if (dut.u_master.wrap) n_wrap++;
    if (unified) n_disable++;
  end

  // ---- LeCroy capture ------------------------------------------------------
  bcd_data_t lc_words [200];
  int lc_idx = 0;
  always @(posedge lc_reset) lc_idx = 0;
  always @(negedge lc_clock) begin
    if (lc_idx < 200) lc_words[lc_idx] = lc_data;
    lc_idx++;
  end

  // ---- printer model -------------------------------------------------------
  bcd_addr_t printed_addr [40];
  bcd_data_t printed_data [40];
  always @(posedge clk) begin
    if (print_cmd && !printer_busy) begin
      if (n_print < 40) begin
        printed_addr[n_print] = print_addr;
        printed_data[n_print] = print_data;
      end
      n_print++;
      repeat (2) @(posedge clk);
      printer_busy <= 1;
      repeat (50) @(posedge clk);
      printer_busy <= 0;
    end
  end

  // ---- checks ----------------------------------------------------------------
  task automatic check_displays(input logic zs, input string when);
    for (int q = 0; q < NQ; q++)
      for (int c = 0; c < 4; c++) begin
        bcd_data_t w;
        w = word(value_of(q * 4 + c + 1), zs);
        chk(shown[q][c] == w, $sformatf("%s: channel %0d shows %h expected %h", when, q * 4 + c + 1, shown[q][c], w));
        for (int d = 0; d < 8; d++) begin
          chk(cathode[q][q == 0 ? c : c][d] == (w[d] < 10 ? 10'(1 << w[d]) : 10'd0), "cathodes");
          if (w[d] == 10 && cathode[q][c][d] == 0) n_blank++;
        end
      end
  endtask

  task automatic check_lecroy(input string when);
    chk(lc_idx >= 16, $sformatf("%s: LeCroy words %0d", when, lc_idx));
    for (int k = 0; k < 16; k++) begin
      bcd_data_t w;
      w = word(value_of(k + 1), 1'b0);       // leading blanks turned back into 0
      chk(lc_words[k] == w, $sformatf("%s: LeCroy word %0d = %h expected %h", when, k, lc_words[k], w));
    end
  endtask

  task automatic scans(input int n);
    repeat (n * SCAN + 3 * CYC) @(negedge clk);
  endtask

  // wait until the scan is at its start, just after channel 16 was read
  task automatic to_scan_start();
    @(posedge dut.u_master.wrap);
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (40 * SCAN) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 3; s++) cnt_in[s] = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    preset_reset = '0;
    // 1: preload distinct counts, then two scans
    for (int t = 0; t < 3000; t++) begin
      for (int s = 0; s < 3; s++)
        for (int k = 0; k < 4; k++)
          cnt_in[s][k] = (t % (1 + s * 4 + k) == 0) && !(s == 2 && k == 3);
      @(negedge clk);
    end
    for (int s = 0; s < 3; s++) cnt_in[s] = '0;
    scans(2);
    check_displays(1'b1, "scan");
    to_scan_start();
    repeat (SCAN + 100) @(negedge clk);    // all 16 words strobed, no reset yet
    check_lecroy("scan");

    // 2: no zero suppression
    zero_suppress = 0;
    scans(1);
    check_displays(1'b0, "no suppression");
    zero_suppress = 1;

    // 3: common enable
    display_test = 1;
    @(negedge bcd_bus.strobe_n);
    repeat (20) @(negedge clk);
    display_test = 0;
    for (int q = 0; q < NQ; q++)
      for (int c = 0; c < 4; c++)
        chk(shown[q][c] == shown[0][0], "common enable loads every channel");
    scans(1);
    check_displays(1'b1, "after display test");

    // 4: test mode, three test pulses
    begin
      logic [23:0] prev_cnt [3][4];
      prev_cnt = cnt;
      @(posedge bcd_bus.strobe_n);
      repeat (10) @(negedge clk);
      test_mode = 1;
      repeat (10) @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        test_pulse = 1; repeat (4) @(negedge clk);
        test_pulse = 0; repeat (4) @(negedge clk);
      end
      test_mode = 0;
      for (int s = 0; s < 3; s++)
        for (int k = 0; k < 4; k++)
          chk(cnt[s][k] == prev_cnt[s][k] + 3, $sformatf("test mode: scaler %0d ch %0d +%0d", s, k, cnt[s][k] - prev_cnt[s][k]));
      scans(1);
      check_displays(1'b1, "after test mode");
    end

    // 5: inhibit
    begin
      logic [23:0] prev_cnt [3][4];
      inhibit_all = 1;
      repeat (5) @(negedge clk);
      prev_cnt = cnt;
      for (int s = 0; s < 3; s++) cnt_in[s] = '1;
      repeat (1000) @(negedge clk);
      if (cnt == prev_cnt) n_inhibit++;
      chk(cnt == prev_cnt, "inhibit stops counting");
      for (int s = 0; s < 3; s++) cnt_in[s] = '0;
      inhibit_all = 0;
    end

    // 6: reset held over a scan
    reset_all = 1;
    repeat (10) @(negedge clk);
    if (cnt[0][0] == 0 && cnt[1][2] == 0 && cnt[2][1] == 0) n_clear++;
    scans(1);
    check_displays(1'b1, "during reset");
    reset_all = 0;
    scans(1);
    check_displays(1'b1, "after reset");

    // 7: front-panel clear of crate 3 only, after new counts
    for (int t = 0; t < 200; t++) begin
      for (int s = 0; s < 3; s++) cnt_in[s] = 4'b0101;
      @(negedge clk);
    end
    for (int s = 0; s < 3; s++) cnt_in[s] = '0;
    crate_clear[3] = 1;
    repeat (3) @(negedge clk);
    crate_clear[3] = 0;
    chk(cnt[1][0] == 0 && cnt[1][2] == 0 && cnt[0][0] == 200 && cnt[2][2] == 200, "crate 3 clear only");
    if (cnt[1][0] == 0 && cnt[0][0] != 0) n_crate_clear++;
    scans(1);
    check_displays(1'b1, "after crate clear");

    // 8: presets on channel 9 = 50 and channel 10 = 30; each gate enables
    // its own channel's counting input
    preset_reset = '1; @(negedge clk); preset_reset = '0;
    fork
      begin : counting
        forever begin
          repeat (4000) @(negedge clk);
          cnt_in[1][0] = preset_gate[0];
          cnt_in[1][1] = preset_gate[1];
          @(negedge clk);
          cnt_in[1][0] = 0;
          cnt_in[1][1] = 0;
        end
      end
    join_none
    scans(4);
    disable fork;
    cnt_in[1][0] = 0;
    cnt_in[1][1] = 0;
    chk(preset_reached == '1 && preset_gate == '0 && preset_gate_n == '1, "both presets reached");
    chk(cnt[1][0] >= 50 && cnt[1][0] <= 50 + SCAN / 4000 + 2, $sformatf("preset 0 stop at %0d", cnt[1][0]));
    chk(cnt[1][1] >= 30 && cnt[1][1] <= 30 + SCAN / 4000 + 2, $sformatf("preset 1 stop at %0d", cnt[1][1]));
    scans(1);
    check_displays(1'b1, "after preset");

    // 9: computer access through the disconnect unit
    begin
      int st;
      comp_cmd.disable_n = 0;
      repeat (10) @(negedge clk);
      st = n_strobe;
      comp_cmd.crate_n = ~3'd3;
      comp_cmd.n_n     = ~5'd5;
      comp_cmd.a_n     = ~4'd2;
      comp_cmd.f_n     = ~F_READ;
      repeat (3) @(negedge clk);
      chk(!comp_resp.q_n && ~comp_resp.r_n == cnt[1][2], $sformatf("computer read %h", ~comp_resp.r_n));
      if (!comp_resp.q_n) n_comp_read++;
      comp_cmd.crate_n = ~3'd0;
      comp_cmd.n_n     = ~5'd23;
      comp_cmd.a_n     = ~4'd3;
      repeat (3) @(negedge clk);
      chk(~comp_resp.r_n == verif_switches, "computer reads verification module");
      repeat (3000) @(negedge clk);
      chk(n_strobe == st, "scan stopped while the computer holds the bus");
      comp_cmd = CMD_RELEASED;
      scans(1);
      check_displays(1'b1, "after computer access");
    end

    // 10: printer
    print_req = 1; repeat (3) @(negedge clk); print_req = 0;
    wait (!printing);
    chk(n_print == 16, $sformatf("printed %0d lines", n_print));
    for (int k = 0; k < 16 && k < n_print; k++) begin
      chk(printed_addr[k] == baddr(k + 1), $sformatf("print line %0d channel", k));
      chk(printed_data[k] == word(value_of(k + 1), 1'b1), $sformatf("print line %0d data", k));
    end

    // every mechanism must have happened
    chk(n_qskip > 0, "Q-scan skipped empty stations");
    chk(n_read > 0, "channels read");
    chk(n_wrap > 0, "scan wrapped");
    chk(n_bcdreset > 0, "BCD reset");
    chk(n_blank > 0, "leading zeros blanked");
    chk(n_enable > 0, "common enable strobe");
    chk(n_test_s1 == 3, "test-mode increments");
    chk(n_inhibit > 0, "inhibit");
    chk(n_clear > 0, "reset of all channels");
    chk(n_crate_clear > 0, "crate front-panel clear");
    chk(n_preset >= NP, $sformatf("presets reached: %0d", n_preset));
    chk(n_disable > 0 && n_comp_read > 0, "computer access");
    chk(n_print > 0, "printer");
    $display("mechanisms: qskip=%0d read=%0d wrap=%0d bcdreset=%0d blank=%0d enable=%0d test=%0d inhibit=%0d clear=%0d crateclear=%0d preset=%0d disable=%0d compread=%0d print=%0d",
             n_qskip, n_read, n_wrap, n_bcdreset, n_blank, n_enable, n_test_s1, n_inhibit, n_clear,
             n_crate_clear, n_preset, n_disable, n_comp_read, n_print);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
