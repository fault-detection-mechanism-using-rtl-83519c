// Frame window: supervises the service window over longer frames and
// raises the watchdog failure.
//
// Once WDRST (clr) falls, frames of FWLEN periods of FWCLK follow each other
// back to back, measured by a main counter advanced by the FWCLK enable
// (tick) and one equality comparator against FWLEN-1. An offset up/down
// counter on SYSCLK counts up on every "service window closed" report and,
// at the end of the frame, down by the one closure each frame requires. If
// no service window closed during the frame (the residue is negative), the
// service window has stopped working or was set longer than the frame, and
// the frame window reports FM_FW_LAPSE. The counter then restarts from zero.
//
// It also turns a service window that closed with a lapse or extra services
// into a failure. wdfail pulses for one SYSCLK cycle, one cycle after the
// event; fail_mode gives its cause in that cycle and holds it until the next
// failure or clr. When both kinds of failure fall in the same cycle the
// service window's is reported. Both outputs go to the configuration
// register and wdfail to the reset down counter. FWCLK, the offset up/down
// counter and the outputs WDFAIL and failure mode follow the text; what the
// frame checks is this design's reading of it.
module frame_window
  import wdt_pkg::*;
(
  input  logic             sysclk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             tick,
  input  logic [LEN_W-1:0] fwlen,
  input  logic             sw_closed,
  input  sw_result_e       sw_result,
  output logic             wdfail,
  output fail_mode_e       fail_mode
);

  logic [LEN_W-1:0] tcnt;
  logic [LEN_W-1:0] last;
  logic             frame_end;
  logic [1:0]       cl_cnt;    // closures so far in this frame, saturates at 3
  logic [1:0]       cl_now;
  logic signed [2:0] residue;
  logic             fw_lapse;
  logic             sw_fail;

  assign last      = (fwlen == '0) ? '0 : fwlen - 1'b1;
  assign frame_end = tick && (tcnt == last);
  assign cl_now    = (sw_closed && cl_cnt != 2'd3) ? cl_cnt + 1'b1 : cl_cnt;
  assign residue   = $signed({1'b0, cl_now}) - 3'sd1;
  assign fw_lapse  = frame_end && (residue < 3'sd0);
  assign sw_fail   = sw_closed && (sw_result != SW_OK);

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      tcnt   <= '0;
      cl_cnt <= '0;
    end else if (clr) begin
      tcnt   <= '0;
      cl_cnt <= '0;
    end else if (frame_end) begin
      tcnt   <= '0;
      cl_cnt <= '0;
    end else begin
      if (tick) tcnt <= tcnt + 1'b1;
      cl_cnt <= cl_now;
    end
  end

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      wdfail    <= 1'b0;
      fail_mode <= FM_NONE;
    end else if (clr) begin
      wdfail    <= 1'b0;
      fail_mode <= FM_NONE;
    end else begin
      wdfail <= sw_fail || fw_lapse;
      if (sw_fail)       fail_mode <= (sw_result == SW_LAPSE) ? FM_SW_LAPSE : FM_SW_MULTI;
      else if (fw_lapse) fail_mode <= FM_FW_LAPSE;
    end
  end

endmodule
