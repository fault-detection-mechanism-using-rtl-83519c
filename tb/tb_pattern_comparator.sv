// Testbench of pattern_comparator: drives random writes, deliberately
// salted with the key words, and checks key_ok against a model of the
// two-word key rule (0xAAAA immediately followed by 0x5555); key_ok must
// be high during the second write.
module tb_pattern_comparator;
  import wdt_pkg::*;

  logic              sysclk = 1'b0;
  logic              rst_n  = 1'b0;
  logic              hold   = 1'b0;
  logic              wr_strobe = 1'b0;
  logic [DATA_W-1:0] dbus = '0;
  logic              key_ok;
  int   checks = 0, failures = 0, keys = 0;
  logic m_armed = 1'b0;
  logic m_key;

  pattern_comparator dut (.*);

  always #5 sysclk = ~sysclk;

  // Model, updated on the same edge as the design.
  always @(posedge sysclk) begin
    if (!rst_n || hold) begin
      m_armed <= 1'b0;
    end else if (wr_strobe) begin
      m_armed <= (dbus == 16'hAAAA);
    end
  end
  assign m_key = rst_n && !hold && wr_strobe && m_armed && dbus == 16'h5555;

  always @(negedge sysclk) if (rst_n) begin
    checks++;
    if (key_ok !== m_key) begin
      failures++; $display("FAIL key_ok=%0b expected %0b", key_ok, m_key);
    end
    keys += key_ok;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    repeat (3) @(negedge sysclk);
    rst_n = 1'b1;
    // A clean key, a key split by an idle cycle, a key with a wrong word between.
    wr_strobe = 1; dbus = 16'hAAAA; @(negedge sysclk);
    dbus = 16'h5555;               @(negedge sysclk);
    wr_strobe = 0;                 @(negedge sysclk);
    checks++; if (keys != 1) begin failures++; $display("FAIL clean key not seen"); end
    wr_strobe = 1; dbus = 16'hAAAA; @(negedge sysclk);
    wr_strobe = 0;                 @(negedge sysclk);
    wr_strobe = 1; dbus = 16'h5555; @(negedge sysclk);
    wr_strobe = 1; dbus = 16'h5555; @(negedge sysclk);
    wr_strobe = 1; dbus = 16'h5556; @(negedge sysclk);
    wr_strobe = 0;                 @(negedge sysclk);
    checks++; if (keys != 2) begin failures++; $display("FAIL split key rejected, keys=%0d", keys); end
    for (int i = 0; i < 4000; i++) begin
      r = $urandom_range(0, 9);
      wr_strobe = ($urandom_range(0, 3) != 0);
      hold      = ($urandom_range(0, 30) == 0);
      dbus = (r < 4) ? 16'hAAAA : (r < 8) ? 16'h5555 : 16'($urandom);
      @(negedge sysclk);
    end
    wr_strobe = 0; hold = 0;
    @(negedge sysclk);
    checks++;
    if (keys < 50) begin failures++; $display("FAIL only %0d keys seen", keys); end
    $display("keys recognised: %0d", keys);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
