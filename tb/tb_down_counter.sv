// Testbench of down_counter: checks that each failure pulse holds rstout
// high for exactly RST_LEN cycles, and that a failure during the pulse
// restarts it.
module tb_down_counter;
  localparam int unsigned RST_LEN = 7;

  logic sysclk = 1'b0;
  logic rst_n  = 1'b0;
  logic wdfail = 1'b0;
  logic rstout;
  int   checks = 0, failures = 0;
  int   m_left = 0;

  down_counter #(.RST_LEN(RST_LEN)) dut (.*);

  always #5 sysclk = ~sysclk;

  always @(posedge sysclk)
    if (!rst_n)      m_left <= 0;
    else if (wdfail) m_left <= RST_LEN;
    else if (m_left > 0) m_left <= m_left - 1;

  always @(negedge sysclk) if (rst_n) begin
    checks++;
    if (rstout !== (m_left > 0)) begin
      failures++; $display("FAIL rstout=%0b, model has %0d cycles left", rstout, m_left);
    end
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int high;
    repeat (3) @(negedge sysclk);
    rst_n = 1'b1;
    repeat (2) @(negedge sysclk);
    checks++; if (rstout) begin failures++; $display("FAIL rstout after reset"); end
    // Measure one isolated pulse directly.
    wdfail = 1; @(negedge sysclk); wdfail = 0;
    high = 0;
    while (rstout) begin high++; @(negedge sysclk); end
    checks++;
    if (high != RST_LEN) begin failures++; $display("FAIL pulse %0d cycles, expected %0d", high, RST_LEN); end
    for (int i = 0; i < 2000; i++) begin
      wdfail = ($urandom_range(0, 12) == 0);
      @(negedge sysclk);
    end
    wdfail = 0;
    repeat (RST_LEN + 2) @(negedge sysclk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
