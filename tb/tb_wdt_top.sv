// End-to-end testbench of wdt_top at its default parameters.
//
// A small processor model configures the watchdog over the bus, starts it
// by dropping INIT and services it with the key 0xAAAA, 0x5555 in the
// middle of every service window. It then injects faults: a missed
// service, a double service, a corrupted key, an unkeyed attempt to change
// the window lengths, and a configuration whose frame window is shorter
// than its service window. Each failure must come at the cycle worked out
// from the window lengths, with the right cause, and must produce an
// RSTOUT pulse of RST_LEN cycles; the status word is read back over the
// bus. Every mechanism is counted, and one that never happened is a failure.
module tb_wdt_top;
  import wdt_pkg::*;

  localparam int SW_DIV = 16, FW_DIV = 64, RST_LEN = 16;

  logic              sysclk = 1'b0;
  logic              rst_n  = 1'b0;
  logic              init   = 1'b1;
  logic              cs     = 1'b0;
  logic              rd_wr  = 1'b0;
  logic [DATA_W-1:0] dbus_in = '0;
  logic [DATA_W-1:0] dbus_out;
  logic              dbus_oe;
  logic              wdfail;
  fail_mode_e        fail_mode;
  logic              rstout;

  wdt_top dut (.*);

  always #5 sysclk = ~sysclk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge sysclk) cyc <= cyc + 1;

  // Mechanism counters.
  int n_service = 0, n_sw_lapse = 0, n_sw_multi = 0, n_fw_lapse = 0;
  int n_rst_pulse = 0, n_bad_key = 0, n_unkeyed = 0, n_status = 0, n_config = 0;

  // Failure log, filled at each negedge.
  int         fail_cyc[$];
  fail_mode_e fail_md[$];
  int         rst_start = -1;
  int         rst_lens[$];

  always @(negedge sysclk) if (rst_n) begin
    if (wdfail) begin
      fail_cyc.push_back(cyc);
      fail_md.push_back(fail_mode);
    end
    if (rstout && rst_start < 0) rst_start = cyc;
    if (!rstout && rst_start >= 0) begin
      rst_lens.push_back(cyc - rst_start);
      rst_start = -1;
    end
    if (dut.wdsrvc) n_service++;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  task automatic wait_cycle(int c);
    while (cyc < c) @(negedge sysclk);
  endtask

  task automatic write(logic [15:0] d);
    cs = 1; rd_wr = 0; dbus_in = d; @(negedge sysclk);
    cs = 0;
  endtask

  task automatic read_status(output status_t st);
    cs = 1; rd_wr = 1; #1;
    st = status_t'(dbus_out);
    check("dbus_oe on read", dbus_oe);
    @(negedge sysclk);
    cs = 0; rd_wr = 0;
    n_status++;
  endtask

  task automatic configure(int fw, int sw);
    write(KEY_FIRST); write(KEY_SECOND); write(16'(fw)); write(16'(sw));
    @(negedge sysclk);
    check("FWLEN loaded", dut.fwlen == 16'(fw));
    check("SWLEN loaded", dut.swlen == 16'(sw));
    n_config++;
  endtask

  // Expect exactly one failure, at cycle c, of cause m, and the reset pulse.
  task automatic expect_fail(int c, fail_mode_e m, string what);
    wait_cycle(c + RST_LEN + 4);
    check({what, ": one failure"}, fail_cyc.size() == 1);
    if (fail_cyc.size() >= 1) begin
      check($sformatf("%s: failure at cycle %0d, expected %0d", what, fail_cyc[0], c), fail_cyc[0] == c);
      check($sformatf("%s: cause %s", what, fail_md[0].name()), fail_md[0] == m);
    end
    check({what, ": one reset pulse"}, rst_lens.size() == 1);
    if (rst_lens.size() >= 1) begin
      check($sformatf("%s: reset pulse %0d cycles", what, rst_lens[0]), rst_lens[0] == RST_LEN);
      n_rst_pulse++;
    end
    if (m == FM_SW_LAPSE) n_sw_lapse++;
    if (m == FM_SW_MULTI) n_sw_multi++;
    if (m == FM_FW_LAPSE) n_fw_lapse++;
    fail_cyc.delete(); fail_md.delete(); rst_lens.delete();
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, win, frm, k, srv0;
    status_t st;
    repeat (3) @(negedge sysclk);
    rst_n = 1'b1;
    @(negedge sysclk);

    // Configuration: frame of 4 FWCLK periods, service window of 4 SWCLK periods.
    configure(4, 4);
    win = 4 * SW_DIV;              // 64 SYSCLK cycles
    frm = 4 * FW_DIV;              // 256 SYSCLK cycles
    // An unkeyed write must not change the lengths.
    write(16'd1); write(16'd9); @(negedge sysclk);
    check("unkeyed write ignored", dut.fwlen == 16'd4 && dut.swlen == 16'd4);
    n_unkeyed++;

    init = 1'b0;
    t0 = cyc;                      // windows and frames start counting here
    // Window k covers cycles t0+win*k .. t0+win*(k+1); a failure of window k
    // shows on wdfail win*(k+1) cycles after t0.

    // Windows 0..9: one correct service each.
    srv0 = n_service;
    for (k = 0; k < 10; k++) begin
      wait_cycle(t0 + win * k + win / 2);
      write(KEY_FIRST); write(KEY_SECOND);
    end
    wait_cycle(t0 + win * 10 + 4);
    check("no failure while serviced", fail_cyc.size() == 0 && rst_lens.size() == 0 && !rstout);
    check("ten services seen", n_service - srv0 == 10);
    read_status(st);
    check("status clean and running", !st.fail_seen && st.running && st.fail_mode == FM_NONE);

    // Window 10: no service.
    expect_fail(t0 + win * 11, FM_SW_LAPSE, "missed service");
    // Window 11 had no service either (the processor was in reset): lapse again.
    expect_fail(t0 + win * 12, FM_SW_LAPSE, "service during reset");
    read_status(st);
    check("status shows lapse", st.fail_seen && st.fail_mode == FM_SW_LAPSE);

    // Window 12: correct. Window 13: two services.
    wait_cycle(t0 + win * 12 + win / 2); write(KEY_FIRST); write(KEY_SECOND);
    wait_cycle(t0 + win * 13 + 10);      write(KEY_FIRST); write(KEY_SECOND);
    wait_cycle(t0 + win * 13 + 40);      write(KEY_FIRST); write(KEY_SECOND);
    expect_fail(t0 + win * 14, FM_SW_MULTI, "double service");
    read_status(st);
    check("status shows multiple service", st.fail_seen && st.fail_mode == FM_SW_MULTI);

    // Window 14: corrupted key only. Window 15: the key interrupted by another write.
    wait_cycle(t0 + win * 14 + win / 2); write(KEY_FIRST); write(16'h5554);
    n_bad_key++;
    expect_fail(t0 + win * 15, FM_SW_LAPSE, "corrupted key");
    wait_cycle(t0 + win * 15 + win / 2); write(KEY_FIRST); write(16'h0000); write(KEY_SECOND);
    n_bad_key++;
    expect_fail(t0 + win * 16, FM_SW_LAPSE, "interrupted key");
    // Windows 16..19 serviced: a whole frame passes cleanly.
    for (k = 16; k < 20; k++) begin
      wait_cycle(t0 + win * k + win / 2);
      write(KEY_FIRST); write(KEY_SECOND);
    end
    wait_cycle(t0 + win * 20 + 4);
    check("clean again after faults", fail_cyc.size() == 0);
    check("frames of 4 windows never lapse", frm == 4 * win);

    // Reconfigure: frame of 1 FWCLK period (64 cycles), service window of 8
    // SWCLK periods (128 cycles). No service window can close in the first
    // frame, so the frame window fails first.
    init = 1'b1; @(negedge sysclk);
    configure(1, 8);
    read_status(st);
    check("status cleared by configuration", !st.fail_seen && !st.running);
    init = 1'b0;
    t0 = cyc;
    expect_fail(t0 + FW_DIV, FM_FW_LAPSE, "frame shorter than window");
    // Service the first window; it closes at 128, inside the second frame,
    // so nothing fails there. Leave INIT high afterwards.
    wait_cycle(t0 + 96); write(KEY_FIRST); write(KEY_SECOND);
    wait_cycle(t0 + 2 * FW_DIV + 4);
    check("frame with a closure passes", fail_cyc.size() == 0);
    init = 1'b1; @(negedge sysclk);
    wait_cycle(cyc + 300);
    check("no failure while INIT is high", fail_cyc.size() == 0 && !rstout);

    // Every mechanism must have happened.
    check("mechanism: service",            n_service   > 0);
    check("mechanism: service lapse",      n_sw_lapse  > 0);
    check("mechanism: multiple service",   n_sw_multi  > 0);
    check("mechanism: frame lapse",        n_fw_lapse  > 0);
    check("mechanism: reset pulse",        n_rst_pulse > 0);
    check("mechanism: bad key",            n_bad_key   > 0);
    check("mechanism: unkeyed write",      n_unkeyed   > 0);
    check("mechanism: status read",        n_status    > 0);
    check("mechanism: configuration load", n_config    > 0);
    $display("services=%0d sw_lapse=%0d sw_multi=%0d fw_lapse=%0d rst_pulses=%0d bad_keys=%0d unkeyed=%0d reads=%0d loads=%0d",
             n_service, n_sw_lapse, n_sw_multi, n_fw_lapse, n_rst_pulse, n_bad_key, n_unkeyed, n_status, n_config);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
