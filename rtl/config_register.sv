// Configuration register: window lengths, status, and the service/reset
// commands of the watchdog.
//
// The register holds FWLEN (frame window length, in FWCLK periods), SWLEN
// (service window length, in SWCLK periods) and a status field with the
// latest failure. It is reached over a 16-bit data bus with a chip select
// CS and a direction line RD/WR (1 = read, 0 = write); one SYSCLK cycle with
// CS high is one access. There is no address: what a write does depends on
// INIT and on the key sequence seen by the pattern comparator (key_ok):
//
//  * INIT high (configuration phase): the windows are held in reset (WDRST
//    high). After the key 0xAAAA, 0x5555 the next write loads FWLEN and the
//    one after it loads SWLEN; the load also clears the status.
//  * INIT low (run phase): the lengths are locked. Each key sequence is one
//    service of the watchdog and pulses WDSRVC for one cycle.
//  * A read returns the status word (wdt_pkg::status_t) combinationally,
//    with dbus_oe high, in the cycle of the access.
//
// The fields FWLEN and SWLEN, the outputs WDRST and WDSRVC and the failure
// status fed back from the frame window follow the block diagram; the access
// protocol, the field widths, the reset values and the status layout are
// this design's own choices. INIT, CS and RD/WR are taken to be synchronous
// to SYSCLK.
module config_register
  import wdt_pkg::*;
#(
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
  input  logic              key_ok,      // write enable from the pattern comparator
  output logic              loading,     // taking data words: hold the comparator
  input  logic              wdfail,
  input  fail_mode_e        fail_mode_in,
  output logic [LEN_W-1:0]  fwlen,
  output logic [LEN_W-1:0]  swlen,
  output logic              wdrst,
  output logic              wdsrvc
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD_FW, S_LOAD_SW} state_e;

  state_e     state;
  logic       wr;
  logic       load_done;
  logic       fail_seen;
  fail_mode_e fail_mode;
  status_t    status;

  assign wr = cs && !rd_wr;

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      fwlen     <= RESET_FWLEN;
      swlen     <= RESET_SWLEN;
      load_done <= 1'b0;
    end else begin
      load_done <= 1'b0;
      if (!init) begin
        state <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE:    if (key_ok) state <= S_LOAD_FW;
          S_LOAD_FW: if (wr) begin
                       fwlen <= dbus_in;
                       state <= S_LOAD_SW;
                     end
          S_LOAD_SW: if (wr) begin
                       swlen     <= dbus_in;
                       state     <= S_IDLE;
                       load_done <= 1'b1;
                     end
          default:   state <= S_IDLE;
        endcase
      end
    end
  end

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      fail_seen <= 1'b0;
      fail_mode <= FM_NONE;
    end else if (load_done) begin
      fail_seen <= 1'b0;
      fail_mode <= FM_NONE;
    end else if (wdfail) begin
      fail_seen <= 1'b1;
      fail_mode <= fail_mode_in;
    end
  end

  assign loading = (state != S_IDLE);
  assign wdrst   = init || load_done;
  assign wdsrvc  = key_ok && !init;

  always_comb begin
    status           = '0;
    status.fail_seen = fail_seen;
    status.fail_mode = fail_mode;
    status.running   = !init;
  end

  assign dbus_oe  = cs && rd_wr;
  assign dbus_out = dbus_oe ? DATA_W'(status) : '0;

endmodule
