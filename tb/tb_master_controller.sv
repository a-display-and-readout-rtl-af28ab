// Testbench for master_controller (2 crates, default 600-tick cycle). The
// testbench answers on the CAMAC bus as two crates: crate 0 station 2 holds a
// 4-channel scaler, crate 1 station 23 a 2-channel one. It checks
//   - the BCD words and channel numbers of two scans, with and without
//     leading-zero suppression;
//   - one strobe per channel, 600 ticks apart within a module, 10 ticks wide,
//     and the BCD lines changing exactly 5 ticks after the strobe ends;
//   - the pipelining: at each strobe the CAMAC bus already holds a later
//     address than the one whose data is on the BCD bus;
//   - one BCD reset per scan, between the last and first channel's strobes;
//   - test mode (crate 7, station 31, F(25), one S1 per test pulse), reset
//     (C and S2), inhibit (I), display test (common enable);
//   - the computer disable: every driver released and no strobes while it is
//     held, and scanning resumes afterwards.
module tb_master_controller;
  import scaler_pkg::*;
  logic clk = 0, rst = 1;
  camac_cmd_t cmd_drv;
  logic disable_n = 1;
  camac_resp_t resp;
  bcd_bus_t bcd_drv;
  logic test_mode = 0, test_pulse = 0, reset_all = 0, inhibit_all = 0;
  logic zero_suppress = 1, display_test = 0, print_req = 0, printer_busy = 0;
  logic print_cmd, printing;
  bcd_addr_t print_addr;
  bcd_data_t print_data;
  int checks = 0, failures = 0;
  longint tick = 0;

  master_controller #(.NUM_CRATES(2)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) tick <= tick + 1;

  // crate contents
  logic [23:0] value [6];
  initial begin
    value[0] = 24'd0;       value[1] = 24'd7;     value[2] = 24'd12345;
    value[3] = 24'hFFFFFF;  value[4] = 24'd1000;  value[5] = 24'd99999999 % 24'hFFFFFF;
  end

  function automatic int chan_at(int c, int n, int a);
    if (c == 0 && n == 2 && a < 4) return a;
    if (c == 1 && n == 23 && a < 2) return 4 + a;
    return -1;
  endfunction

  logic [2:0] bus_c;
  logic [4:0] bus_n;
  logic [3:0] bus_a;
  assign bus_c = ~cmd_drv.crate_n;
  assign bus_n = ~cmd_drv.n_n;
  assign bus_a = ~cmd_drv.a_n;

  always_comb begin
    int ch;
    ch = chan_at(int'(bus_c), int'(bus_n), int'(bus_a));
    resp = RESP_RELEASED;
    if (ch >= 0 && cmd_drv.f_n == ~F_READ) begin
      resp.q_n = 1'b0;
      resp.r_n = ~value[ch];
    end
  end

  function automatic bcd_data_t expect_word(logic [23:0] v, logic zs);
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

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0d %s", tick, what); end
  endtask

  // strobe / reset monitor
  int strobes = 0, resets = 0, s1_count = 0;
  int seq_ch = 0;           // expected next channel index 0..5
  longint last_strobe_fall = -1, strobe_fall, strobe_rise = -1;
  logic prev_strobe_n = 1, prev_reset_n = 1, prev_s1_n = 1;
  bcd_bus_t prev_bus;
  logic check_change = 0;
  logic monitor_on = 1;

  always @(posedge clk) if (!rst && monitor_on) begin
    prev_strobe_n <= bcd_drv.strobe_n;
    prev_reset_n  <= bcd_drv.reset_n;
    prev_s1_n     <= cmd_drv.s1_n;
    prev_bus      <= bcd_drv;
    if (!cmd_drv.s1_n && prev_s1_n) s1_count++;
    if (!bcd_drv.reset_n && prev_reset_n) begin
      resets++;
      chk(seq_ch == 0, "BCD reset only between scans");
    end
    if (!bcd_drv.strobe_n && prev_strobe_n) begin
      bcd_addr_t a;
      int cam_c, cam_n, cam_a;
      strobes++;
      strobe_fall = tick;
      a = ~bcd_drv.addr_n;
      chk(a[0] == 4'(seq_ch + 1) && a[1] == 0 && a[2] == 0, $sformatf("channel number %0d%0d%0d, expected %0d", a[2], a[1], a[0], seq_ch + 1));
      chk(~bcd_drv.data_n == expect_word(value[seq_ch], zero_suppress), $sformatf("data of channel %0d", seq_ch + 1));
      // pipelining: CAMAC bus is at a later address than the data shown
      cam_c = int'(bus_c); cam_n = int'(bus_n); cam_a = int'(bus_a);
      chk(chan_at(cam_c, cam_n, cam_a) != seq_ch, "CAMAC address ahead of BCD data");
      if (seq_ch == 1 || seq_ch == 2 || seq_ch == 3 || seq_ch == 5)
        chk(tick - last_strobe_fall == 600, $sformatf("strobe spacing %0d", tick - last_strobe_fall));
      last_strobe_fall = tick;
      seq_ch = (seq_ch + 1) % 6;
    end
    if (bcd_drv.strobe_n && !prev_strobe_n) begin
      chk(tick - strobe_fall == 10, "strobe width");
      strobe_rise = tick;
      check_change <= 1;
    end
    if (!disable_n) check_change <= 0;
    else if (check_change && bcd_drv.addr_n != prev_bus.addr_n) begin
      // the lines hold through the guard band; between channels of one
      // module they change exactly 5 ticks after the strobe
      if (seq_ch == 1 || seq_ch == 2 || seq_ch == 3 || seq_ch == 5)
        chk(tick - strobe_rise == 5, $sformatf("guard band %0d", tick - strobe_rise));
      else
        chk(tick - strobe_rise >= 5, $sformatf("guard band %0d", tick - strobe_rise));
      check_change <= 0;
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one scan of 2 crates: 46 stations + 6 channels = 52 cycles
  localparam int SCAN = 52 * 600;

  initial begin
    int s_before, st;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2 * SCAN + 1200) @(negedge clk);
    chk(strobes >= 12, $sformatf("strobes in two scans: %0d", strobes));
    chk(resets >= 2, "BCD resets");
    // no zero suppression for the next scan
    wait (seq_ch == 5);
    wait (seq_ch == 0);
    zero_suppress = 0;
    repeat (SCAN) @(negedge clk);
    wait (seq_ch == 5);
    wait (seq_ch == 0);
    zero_suppress = 1;

    // front panel lines
    reset_all = 1; inhibit_all = 1; display_test = 1;
    repeat (3) @(negedge clk);
    chk(!cmd_drv.c_n && !cmd_drv.s2_n, "reset drives C and S2");
    chk(!cmd_drv.i_n, "inhibit drives I");
    chk(!bcd_drv.enable_n, "display test drives common enable");
    reset_all = 0; inhibit_all = 0; display_test = 0;
    repeat (3) @(negedge clk);
    chk(cmd_drv.c_n && cmd_drv.s2_n && cmd_drv.i_n && bcd_drv.enable_n, "lines released");

    // computer disable, outside a strobe
    wait (bcd_drv.strobe_n);
    repeat (20) @(negedge clk);
    disable_n = 0;
    repeat (4) @(negedge clk);
    st = strobes;
    chk(cmd_drv == CMD_RELEASED && bcd_drv == BCD_RELEASED, "disable releases all drivers");
    repeat (3000) @(negedge clk);
    chk(strobes == st, "no strobes while disabled");
    chk(cmd_drv == CMD_RELEASED, "still released");
    disable_n = 1;
    repeat (4000) @(negedge clk);
    chk(strobes > st, "scan resumes after disable");

    // test mode
    wait (!bcd_drv.strobe_n);
    wait (bcd_drv.strobe_n);
    repeat (10) @(negedge clk);
    test_mode = 1;
    monitor_on = 0;
    repeat (5) @(negedge clk);
    chk(~cmd_drv.crate_n == 3'd7 && ~cmd_drv.n_n == 5'd31 && ~cmd_drv.f_n == 5'd25, "test address F(25) C7 N31");
    s_before = s1_count;
    monitor_on = 1;
    for (int p = 0; p < 7; p++) begin
      test_pulse = 1; repeat (3) @(negedge clk);
      test_pulse = 0; repeat (3) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    chk(s1_count - s_before == 7, $sformatf("S1 per test pulse: %0d", s1_count - s_before));
    $display("strobes=%0d resets=%0d", strobes, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
