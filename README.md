# Windowed watchdog timer with frame supervision

A watchdog timer guards a processor against hangs and runaway code. The
processor must "service" the watchdog regularly, and if it stops doing so
the watchdog pulls the processor's reset. A plain watchdog only catches a
processor that services too *late*. This one is stricter in three ways:

* **Windowed servicing.** Time is cut into back-to-back *service windows*.
  Each window must get **exactly one** service. A window with no service is a
  *lapse*. A window with two or more is a *multiple service*. A program stuck
  in a loop that keeps servicing is caught too.
* **Key-protected access.** A service is not a single strobe. It is the
  two-word key `0xAAAA` then `0x5555`, written on consecutive bus writes.
  The same key must come before any change to the window lengths, and the
  lengths can only change while the watchdog is stopped. Random writes from
  runaway code are very unlikely to service or reconfigure it.
* **Frame supervision.** A second, independent timer cuts time into longer
  *frames*. At least one service window must close in every frame. This
  catches a service window that has stopped advancing, or that was set
  longer than the frame.

The watchdog runs from its own clock, SYSCLK, and needs nothing from the
processor except the bus writes. Any violation gives a one-cycle `wdfail`
pulse. The cause is recorded in a status word, and `rstout` is held high
for `RST_LEN` cycles to reset the processor.

## Structure

```
 dbus_in, cs, rd_wr ──► pattern_comparator ──key_ok──► config_register ──► dbus_out/dbus_oe (status)
                                                        │  │   │    ▲
                                  FWLEN ◄───────────────┘  │   │    │ wdfail, fail_mode
                                  SWLEN ◄──────────────────┘   │    │
                               WDRST, WDSRVC ◄─────────────────┘    │
 init ─────────────────────────► config_register                    │
                                                                    │
 freq_divider ──swclk_tick──► service_window ──sw_closed, sw_result─► frame_window ──► wdfail, fail_mode
      └──────────fwclk_tick──────────────────────────────────────────►     │
                                                                           ▼
                                                              down_counter ──► rstout
```

| Module | Role |
|---|---|
| `wdt_pkg` | Bus width, key words, failure-mode and window-result enums, status-word struct |
| `pattern_comparator` | Spots `0xAAAA` followed at once by `0x5555`; drives `key_ok` during the second write |
| `config_register` | Holds FWLEN, SWLEN and the status. Turns keys into a length load (INIT high) or a service pulse WDSRVC (INIT low). Drives WDRST |
| `freq_divider` | Makes the slow SWCLK and FWCLK as one-cycle enables of SYSCLK (÷`SW_DIV`, ÷`FW_DIV`) |
| `service_window` | Main counter on SWCLK; up/down service counter on SYSCLK; reports each window's closure and its outcome |
| `frame_window` | Main counter on FWCLK; up/down closure counter on SYSCLK; raises `wdfail` and `fail_mode` |
| `down_counter` | Stretches each `wdfail` into an `RST_LEN`-cycle `rstout` pulse |
| `wdt_top` | Wires the blocks together |

Everything is one clock domain (SYSCLK), with an asynchronous active-low
`rst_n` for the watchdog's own power-on reset. The slow window clocks are
clock enables, not separate clock nets. The counters therefore need only
one narrow equality comparator each, and there is no clock-domain crossing.
`init`, `cs`, `rd_wr` and `dbus_in` are taken to be synchronous to SYSCLK.

## Operating sequence and bus protocol

The bus has no address lines. One SYSCLK cycle with `cs` high is one access.
`rd_wr = 1` is a read and `rd_wr = 0` is a write. What a write means depends
on `init` and on the key:

1. **Configuration (`init` high).** The windows are held in reset (WDRST
   high). Write `0xAAAA`, `0x5555`, then FWLEN, then SWLEN. Writes may be
   back to back. Writes without the key are ignored. The two data words are
   taken as data even if they equal a key word. Loading clears the status.
2. **Start.** Drop `init`. The dividers, the service window and the frame
   window all start counting from zero on the next cycle.
3. **Run (`init` low).** FWLEN and SWLEN are locked. Each key
   `0xAAAA, 0x5555` is one service. WDSRVC pulses during the `0x5555`
   write. Any other write between the two key words spoils the key.
4. **Read (any time).** A read returns the status word on `dbus_out`, with
   `dbus_oe` high, in the cycle of the access:

| Bits | Field | Meaning |
|---|---|---|
| 15 | `fail_seen` | a failure has happened since the last length load |
| 14:13 | `fail_mode` | cause of the latest failure (below) |
| 12 | `running` | `init` is low |
| 11:0 | — | zero |

`fail_mode` values: 0 none, 1 service-window lapse, 2 multiple service,
3 frame lapse.

## Window arithmetic and timing

With `init` low, service window *k* covers SYSCLK cycles
`[k·W, (k+1)·W)`, counted from the cycle after `init` falls, where
`W = SWLEN · SW_DIV`. Frames have length `F = FWLEN · FW_DIV`. A length of
0 is treated as 1.

* **Service window decision.** An up/down counter counts each service up.
  At the window's last SWCLK tick it subtracts the one expected service. A
  residue of 0 is OK, −1 is a lapse and ≥ +1 is a multiple service. A
  service in the closing cycle counts for the closing window. The closure
  (`sw_closed`) and its outcome are presented in that same cycle. A frame
  that ends on the same cycle therefore still sees the closure.
* **Frame decision.** A second up/down counter counts closures up and
  subtracts one at the end of the frame. A negative residue is a frame
  lapse. Both counters then restart from zero, so credit does not carry
  over between windows or frames.
* **Failure latency.** `wdfail` is registered. It is high for one cycle,
  exactly `(k+1)·W` cycles after `init` fell for a failed window *k*, and
  `(j+1)·F` cycles after it for a lapsed frame *j*. `fail_mode`
  is valid in that cycle and holds until the next failure. If a window
  failure and a frame lapse fall in the same cycle, the window failure is
  reported.
* **Reset pulse.** `rstout` rises the cycle after `wdfail` and stays high
  for `RST_LEN` cycles. A new failure during the pulse restarts it. The
  watchdog keeps running while the processor is in reset. A processor that
  cannot service during its reset therefore gets a further lapse, and
  another reset pulse, for each window it misses.

If FWLEN·FW_DIV < SWLEN·SW_DIV, the frame is shorter than a service window
and some frames must lapse. That configuration is a detectable error, not a
supported mode.

## Parameters

| Parameter (on `wdt_top`) | Default | Meaning |
|---|---|---|
| `SW_DIV` | 16 | SYSCLK cycles per SWCLK period |
| `FW_DIV` | 64 | SYSCLK cycles per FWCLK period |
| `RST_LEN` | 16 | length of the `rstout` pulse in SYSCLK cycles |
| `RESET_FWLEN` | 8 | FWLEN after power-on reset (512-cycle frame) |
| `RESET_SWLEN` | 4 | SWLEN after power-on reset (64-cycle window) |

FWLEN and SWLEN are 16 bits (`wdt_pkg::LEN_W`), and so is the data bus
(`DATA_W`). The key words are `KEY_FIRST`/`KEY_SECOND` in `wdt_pkg`. After
synthesis the whole watchdog is about 120 word-level cells and 93
flip-flops.

## What is given and what is chosen

The architecture follows a published block diagram of an "improved"
watchdog, and the following come from it:

* the block list;
* the signal names SYSCLK, DBUS, CS, RD/WR, INIT, FWLEN, SWLEN, WDRST,
  WDSRVC, SWCLK, FWCLK, "service window closed", WDFAIL, failure mode and
  RSTOUT;
* the key patterns `0xAAAA`/`0x5555`;
* the rule that the windows start when INIT falls;
* the split into a slow main counter and a SYSCLK up/down counter in each
  window.

The source describes the blocks only by what they do, not how they work.
These choices are this design's own:

* **Service rule.** The exactly-once rule, and the treatment of extra
  services as a fault.
* **Frame rule.** What the frame checks: at least one closure per frame.
* **Bus protocol.** The key order, the consecutive-write rule, the load
  order FWLEN then SWLEN, and servicing by the key while running.
* **Status word.** Its layout, and that it stays sticky until the next
  length load.
* **Sizes.** Every width, divider ratio, reset value and the reset-pulse
  length.
* **Signal changes.** The split of the bidirectional DBUS into
  `dbus_in`/`dbus_out`/`dbus_oe`, and the added `rst_n`.

The source also shows an earlier, simpler implementation: one counter
against one compare value, with a toggle-flip-flop clock divider. That
version is not reproduced. Its timing figures for a Spartan-3 FPGA
(about 549 MHz) do not apply to this RTL. The guarded processor, and an
interface block of that earlier version that appears only by name, are not
part of the RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself if a timeout is reached.

| Testbench | What it checks |
|---|---|
| `tb_freq_divider` | tick period and phase against a cycle counter, including restarts |
| `tb_pattern_comparator` | 4000 random writes salted with key words, against a model of the key rule |
| `tb_config_register` | keyed and unkeyed loads, back-to-back and spaced writes, length lock, WDSRVC, WDRST, status read-back and clearing |
| `tb_service_window` | 40 random (SWLEN, tick rate, service density) segments against a window model; window period measured directly |
| `tb_frame_window` | 40 random segments of injected closures and outcomes against a frame model; exact first-lapse time |
| `tb_down_counter` | pulse length measured directly, then random failures against a model |
| `tb_wdt_top` | the whole watchdog at default parameters, driven by a processor model |

`tb_wdt_top` drives the whole watchdog at its default parameters. Its
processor model configures the watchdog, services it in mid-window and
injects faults:

* a missed service;
* a double service;
* a corrupted key and an interrupted key;
* an unkeyed length write;
* a frame shorter than the service window.

Each failure is checked for its exact cycle and its cause, and for one
`RST_LEN`-cycle reset pulse. The status is read back over the bus. Every
mechanism is counted, and a mechanism that never occurs is a failure.

To simulate one testbench with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    rtl/wdt_pkg.sv tb/tb_wdt_top.sv --top-module tb_wdt_top -o sim
./obj_dir/sim
```

Replace `tb_wdt_top` with any other testbench name. All of them finish in
well under a second.
