// Shared types and constants of the windowed watchdog timer.
//
// The watchdog sits beside a processor and checks that the processor
// services it once per service window, that service windows keep closing
// within every frame window, and it pulls the processor's reset when either
// rule is broken. The key words 0xAAAA and 0x5555 are the two patterns of
// the pattern comparator. The data bus is 16 bits wide because the key
// words are 16-bit patterns; the failure-mode encoding and the layout of
// the status word are this design's own choices.
package wdt_pkg;

  localparam int unsigned DATA_W = 16;
  localparam int unsigned LEN_W  = 16;

  localparam logic [DATA_W-1:0] KEY_FIRST  = 16'hAAAA;
  localparam logic [DATA_W-1:0] KEY_SECOND = 16'h5555;

  // Cause of the most recent watchdog failure.
  typedef enum logic [1:0] {
    FM_NONE     = 2'd0,  // no failure since the last configuration load
    FM_SW_LAPSE = 2'd1,  // a service window ended without a service
    FM_SW_MULTI = 2'd2,  // more than one service in one service window
    FM_FW_LAPSE = 2'd3   // a frame window ended without any service window closing
  } fail_mode_e;

  // Result of a service window, reported to the frame window when it closes.
  typedef enum logic [1:0] {
    SW_OK    = 2'd0,
    SW_LAPSE = 2'd1,
    SW_MULTI = 2'd2
  } sw_result_e;

  // Status word returned on a read of the configuration register.
  typedef struct packed {
    logic        fail_seen;   // [15]    a failure happened since the last load
    fail_mode_e  fail_mode;   // [14:13] cause of the latest failure
    logic        running;     // [12]    INIT is low, windows are running
    logic [11:0] reserved;    // [11:0]  read as zero
  } status_t;

endpackage
