// Improved windowed watchdog timer, top level.
//
// The watchdog runs from SYSCLK alone, independent of the processor it
// guards. The processor configures it over a small bus (16-bit data, CS,
// RD/WR) while INIT is high, then drops INIT to start it. From then on it
// must service the watchdog, by writing the key 0xAAAA followed by 0x5555,
// exactly once in every service window (SWLEN periods of the derived clock
// SWCLK). A frame window (FWLEN periods of FWCLK) checks that service
// windows keep closing. Any violation pulses WDFAIL, records the cause in
// the configuration register, and the down counter holds RSTOUT, the
// processor's reset, high for RST_LEN SYSCLK cycles.
//
//   DBUS, CS, RD/WR -> pattern_comparator -> config_register
//                       config_register --WDSRVC--> service_window
//   freq_divider --SWCLK--> service_window --closed--> frame_window <--FWCLK--
//   frame_window --WDFAIL, mode--> config_register, down_counter --> RSTOUT
//
// The block structure and the names of its signals follow the block
// diagram of the design; the bus protocol, the widths, the divider ratios,
// the reset pulse length and the asynchronous active-low rst_n (power-on
// reset of the watchdog itself) are this design's choices. The bus is
// brought out as separate in/out/enable signals instead of a tristate DBUS.
module wdt_top
  import wdt_pkg::*;
#(
  parameter int unsigned      SW_DIV      = 16,
  parameter int unsigned      FW_DIV      = 64,
  parameter int unsigned      RST_LEN     = 16,
  parameter logic [LEN_W-1:0] RESET_FWLEN = 16'd8,
  parameter logic [LEN_W-1:0] RESET_SWLEN = 16'd4
) (
  input  logic              sysclk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              cs,
  input  logic              rd_wr,
  input  logic [DATA_W-1:0] dbus_in,
  output logic [DATA_W-1:0] dbus_out,
  output logic              dbus_oe,
  output logic              wdfail,
  output fail_mode_e        fail_mode,
  output logic              rstout
);

  logic             key_ok;
  logic             loading;
  logic [LEN_W-1:0] fwlen;
  logic [LEN_W-1:0] swlen;
  logic             wdrst;
  logic             wdsrvc;
  logic             swclk_tick;
  logic             fwclk_tick;
  logic             sw_closed;
  sw_result_e       sw_result;

  pattern_comparator u_pattern (
    .sysclk    (sysclk),
    .rst_n     (rst_n),
    .hold      (loading),
    .wr_strobe (cs && !rd_wr),
    .dbus      (dbus_in),
    .key_ok    (key_ok)
  );

  config_register #(
    .RESET_FWLEN (RESET_FWLEN),
    .RESET_SWLEN (RESET_SWLEN)
  ) u_config (
    .sysclk       (sysclk),
    .rst_n        (rst_n),
    .init         (init),
    .cs           (cs),
    .rd_wr        (rd_wr),
    .dbus_in      (dbus_in),
    .dbus_out     (dbus_out),
    .dbus_oe      (dbus_oe),
    .key_ok       (key_ok),
    .loading      (loading),
    .wdfail       (wdfail),
    .fail_mode_in (fail_mode),
    .fwlen        (fwlen),
    .swlen        (swlen),
    .wdrst        (wdrst),
    .wdsrvc       (wdsrvc)
  );

  freq_divider #(
    .SW_DIV (SW_DIV),
    .FW_DIV (FW_DIV)
  ) u_divider (
    .sysclk     (sysclk),
    .rst_n      (rst_n),
    .clr        (wdrst),
    .swclk_tick (swclk_tick),
    .fwclk_tick (fwclk_tick)
  );

  service_window u_service (
    .sysclk    (sysclk),
    .rst_n     (rst_n),
    .clr       (wdrst),
    .tick      (swclk_tick),
    .swlen     (swlen),
    .srvc      (wdsrvc),
    .sw_closed (sw_closed),
    .sw_result (sw_result)
  );

  frame_window u_frame (
    .sysclk    (sysclk),
    .rst_n     (rst_n),
    .clr       (wdrst),
    .tick      (fwclk_tick),
    .fwlen     (fwlen),
    .sw_closed (sw_closed),
    .sw_result (sw_result),
    .wdfail    (wdfail),
    .fail_mode (fail_mode)
  );

  down_counter #(
    .RST_LEN (RST_LEN)
  ) u_reset (
    .sysclk (sysclk),
    .rst_n  (rst_n),
    .wdfail (wdfail),
    .rstout (rstout)
  );

  // A failure is reported only while the watchdog runs.
  assert property (@(posedge sysclk) wdfail |-> !wdrst);

endmodule
