// Service window: checks that the processor services the watchdog exactly
// once in every window of SWLEN periods of SWCLK.
//
// Once WDRST (clr) falls, which happens when INIT goes low, windows follow
// each other back to back. A main counter, advanced by the SWCLK enable
// (tick), measures the window; a single equality comparator against
// SWLEN-1 finds its end, which is why a slow SWCLK keeps the comparator
// small. Services (srvc, one SYSCLK cycle each) are counted by an up/down
// counter on SYSCLK: it counts up on each service and, when the window
// closes, down by the one service that is expected. A residue of zero means
// the window was serviced correctly; minus one means no service (lapse);
// above zero means extra services. The counter then restarts from zero.
//
// Outputs: sw_closed is high for one cycle per window, in the cycle of the
// closing tick, and sw_result gives the outcome in that same cycle, so the
// frame window sees a closure in the frame it falls in even when both
// windows end on the same SYSCLK cycle. A service in the cycle of the
// closing tick counts for the closing window.
// SWLEN = 0 is treated as 1. The SWCLK main counter, the SYSCLK up/down
// counter and the "service window closed" output follow the text; the
// exactly-once rule and the residue check are this design's reading of them.
module service_window
  import wdt_pkg::*;
(
  input  logic             sysclk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             tick,
  input  logic [LEN_W-1:0] swlen,
  input  logic             srvc,
  output logic             sw_closed,
  output sw_result_e       sw_result
);

  logic [LEN_W-1:0] tcnt;
  logic [LEN_W-1:0] last;
  logic             win_end;
  logic [1:0]       svc_cnt;   // services so far in this window, saturates at 2
  logic [1:0]       svc_now;   // including a service in this cycle
  logic signed [2:0] residue;

  assign last    = (swlen == '0) ? '0 : swlen - 1'b1;
  assign win_end = tick && (tcnt == last);
  assign svc_now = (srvc && svc_cnt != 2'd2) ? svc_cnt + 1'b1 : svc_cnt;
  assign residue = $signed({1'b0, svc_now}) - 3'sd1;

  assign sw_closed = !clr && win_end;

  always_comb begin
    if (residue == 3'sd0)     sw_result = SW_OK;
    else if (residue < 3'sd0) sw_result = SW_LAPSE;
    else                      sw_result = SW_MULTI;
  end

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt    <= '0;
      svc_cnt <= '0;
    end else if (clr) begin
      tcnt    <= '0;
      svc_cnt <= '0;
    end else begin
      if (win_end) begin
        tcnt    <= '0;
        svc_cnt <= '0;
      end else begin
        if (tick) tcnt <= tcnt + 1'b1;
        svc_cnt <= svc_now;
      end
    end
  end

endmodule
