// Frequency divider: derives the two slow window clocks from SYSCLK.
//
// SWCLK clocks the service window and FWCLK the frame window; both are much
// slower than SYSCLK so that the window counters need fewer and narrower
// comparators. The whole watchdog runs on SYSCLK alone, so each derived
// clock is delivered as a one-SYSCLK-cycle enable pulse (swclk_tick,
// fwclk_tick) once per divided period, instead of as a separate clock net.
// The two ratios are this design's choice; the text gives none.
//
// Timing: with clr low, swclk_tick is high on every SW_DIV-th SYSCLK cycle,
// the first one SW_DIV cycles after clr falls; likewise fwclk_tick with
// FW_DIV. clr (the watchdog reset) restarts both dividers so that the
// windows are aligned with the falling edge of INIT.
module freq_divider #(
  parameter int unsigned SW_DIV = 16,
  parameter int unsigned FW_DIV = 64
) (
  input  logic sysclk,
  input  logic rst_n,
  input  logic clr,
  output logic swclk_tick,
  output logic fwclk_tick
);

  localparam int unsigned SW_W = (SW_DIV > 1) ? $clog2(SW_DIV) : 1;
  localparam int unsigned FW_W = (FW_DIV > 1) ? $clog2(FW_DIV) : 1;
  localparam logic [SW_W-1:0] SW_LAST = SW_W'(SW_DIV - 1);
  localparam logic [FW_W-1:0] FW_LAST = FW_W'(FW_DIV - 1);

  logic [SW_W-1:0] sw_cnt;
  logic [FW_W-1:0] fw_cnt;

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      sw_cnt <= '0;
      fw_cnt <= '0;
    end else if (clr) begin
      sw_cnt <= '0;
      fw_cnt <= '0;
    end else begin
      sw_cnt <= (sw_cnt == SW_LAST) ? '0 : sw_cnt + 1'b1;
      fw_cnt <= (fw_cnt == FW_LAST) ? '0 : fw_cnt + 1'b1;
    end
  end

  assign swclk_tick = !clr && (sw_cnt == SW_LAST);
  assign fwclk_tick = !clr && (fw_cnt == FW_LAST);

  initial begin
    assert (SW_DIV >= 1 && FW_DIV >= 1) else $error("divider ratios must be at least 1");
  end

endmodule
