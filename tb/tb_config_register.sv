// Testbench of config_register, with the pattern comparator in front of it
// as in the watchdog: checks key-protected loading of FWLEN and SWLEN in
// the configuration phase, that unprotected writes and run-phase writes
// leave them alone, that a run-phase key gives one WDSRVC pulse, that WDRST
// follows INIT, and that the failure status is latched and read back.
module tb_config_register;
  import wdt_pkg::*;

  logic              sysclk = 1'b0;
  logic              rst_n  = 1'b0;
  logic              init   = 1'b1;
  logic              cs     = 1'b0;
  logic              rd_wr  = 1'b0;
  logic [DATA_W-1:0] dbus_in = '0;
  logic [DATA_W-1:0] dbus_out;
  logic              dbus_oe;
  logic              key_ok, loading;
  logic              wdfail = 1'b0;
  fail_mode_e        fail_mode_in = FM_NONE;
  logic [LEN_W-1:0]  fwlen, swlen;
  logic              wdrst, wdsrvc;

  int checks = 0, failures = 0;
  int srvc_pulses = 0;

  pattern_comparator u_pat (.sysclk, .rst_n, .hold(loading), .wr_strobe(cs && !rd_wr),
                            .dbus(dbus_in), .key_ok);
  config_register #(.RESET_FWLEN(16'd8), .RESET_SWLEN(16'd4)) dut (.*);

  always #5 sysclk = ~sysclk;
  always @(posedge sysclk) srvc_pulses <= srvc_pulses + (wdsrvc ? 1 : 0);

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Writes alternate between back-to-back accesses and accesses with an
  // idle cycle after them.
  bit gap = 1'b0;
  task automatic write(logic [15:0] d);
    cs = 1; rd_wr = 0; dbus_in = d; @(negedge sysclk);
    cs = 0;
    if (gap) @(negedge sysclk);
    gap = !gap;
  endtask

  task automatic read(output logic [15:0] d);
    cs = 1; rd_wr = 1; #1;
    d = dbus_out;
    check("dbus_oe during read", dbus_oe === 1'b1);
    @(negedge sysclk);
    cs = 0; rd_wr = 0; #1;
    check("dbus_oe released", dbus_oe === 1'b0);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] st;
    int n_before;
    repeat (3) @(negedge sysclk);
    rst_n = 1'b1;
    @(negedge sysclk);
    check("reset FWLEN", fwlen == 16'd8);
    check("reset SWLEN", swlen == 16'd4);
    check("WDRST high while INIT high", wdrst === 1'b1);
    // Writes without the key are ignored.
    write(16'h1234); write(16'h0042);
    check("unkeyed write ignored", fwlen == 16'd8 && swlen == 16'd4);
    // Keyed load: key, FWLEN, SWLEN.
    write(16'hAAAA); write(16'h5555); write(16'd20); write(16'd3);
    check("keyed load FWLEN", fwlen == 16'd20);
    check("keyed load SWLEN", swlen == 16'd3);
    // Wrong second key word.
    write(16'hAAAA); write(16'h5554); write(16'd99); write(16'd98);
    check("bad key rejected", fwlen == 16'd20 && swlen == 16'd3);
    // Data equal to a key word loads as data.
    write(16'hAAAA); write(16'h5555); write(16'hAAAA); write(16'h5555);
    check("key-valued data loads", fwlen == 16'hAAAA && swlen == 16'h5555);
    check("no service in configuration phase", srvc_pulses == 0);
    write(16'hAAAA); write(16'h5555); write(16'd10); write(16'd2);
    // Run phase.
    init = 1'b0; @(negedge sysclk);
    check("WDRST low while running", wdrst === 1'b0);
    read(st);
    check("status running, no failure", st == 16'h1000);
    n_before = srvc_pulses;
    write(16'hAAAA); write(16'h5555);
    @(negedge sysclk);
    check("one WDSRVC per key", srvc_pulses == n_before + 1);
    write(16'hAAAA); write(16'h5555); write(16'd77); write(16'd66);
    check("lengths locked while running", fwlen == 16'd10 && swlen == 16'd2);
    check("second key serviced", srvc_pulses == n_before + 2);
    // Failure status.
    wdfail = 1; fail_mode_in = FM_SW_MULTI; @(negedge sysclk);
    wdfail = 0; fail_mode_in = FM_NONE;     @(negedge sysclk);
    read(st);
    check("status after SW_MULTI", st == {1'b1, FM_SW_MULTI, 1'b1, 12'h000});
    wdfail = 1; fail_mode_in = FM_FW_LAPSE; @(negedge sysclk);
    wdfail = 0; @(negedge sysclk);
    read(st);
    check("status after FW_LAPSE", st == {1'b1, FM_FW_LAPSE, 1'b1, 12'h000});
    // Back to configuration: status kept until the next load.
    init = 1'b1; @(negedge sysclk);
    read(st);
    check("status kept in configuration", st == {1'b1, FM_FW_LAPSE, 1'b0, 12'h000});
    write(16'hAAAA); write(16'h5555); write(16'd5); write(16'd1);
    read(st);
    check("status cleared by load", st == 16'h0000);
    check("final lengths", fwlen == 16'd5 && swlen == 16'd1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
