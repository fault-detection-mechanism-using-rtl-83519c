// Testbench of freq_divider: checks the period and phase of both derived
// clock enables against a cycle-count model, including restarts by clr.
module tb_freq_divider;
  localparam int unsigned SW_DIV = 5;
  localparam int unsigned FW_DIV = 12;

  logic sysclk = 1'b0;
  logic rst_n  = 1'b0;
  logic clr    = 1'b1;
  logic swclk_tick, fwclk_tick;
  int   checks = 0, failures = 0;
  int   n = 0;            // SYSCLK edges since clr fell
  int   sw_seen = 0, fw_seen = 0;

  freq_divider #(.SW_DIV(SW_DIV), .FW_DIV(FW_DIV)) dut (.*);

  always #5 sysclk = ~sysclk;

  always @(posedge sysclk) if (rst_n && !clr) n <= n + 1; else n <= 0;

  always @(negedge sysclk) if (rst_n) begin
    checks++;
    if (swclk_tick !== (!clr && (n % SW_DIV) == SW_DIV - 1)) begin
      failures++; $display("FAIL swclk_tick=%0b at n=%0d clr=%0b", swclk_tick, n, clr);
    end
    checks++;
    if (fwclk_tick !== (!clr && (n % FW_DIV) == FW_DIV - 1)) begin
      failures++; $display("FAIL fwclk_tick=%0b at n=%0d clr=%0b", fwclk_tick, n, clr);
    end
    sw_seen += swclk_tick;
    fw_seen += fwclk_tick;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge sysclk);
    rst_n = 1'b1;
    repeat (2) @(negedge sysclk);
    clr = 1'b0;
    repeat (200) @(negedge sysclk);
    clr = 1'b1;                        // restart in mid-period
    repeat (3) @(negedge sysclk);
    clr = 1'b0;
    repeat (101) @(negedge sysclk);
    checks++;
    if (sw_seen < 50 || fw_seen < 20) begin
      failures++; $display("FAIL too few ticks sw=%0d fw=%0d", sw_seen, fw_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
