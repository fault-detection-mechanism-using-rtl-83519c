// Pattern comparator: recognises the two-word key 0xAAAA, 0x5555 on the bus.
//
// Every write access (wr_strobe high for one SYSCLK cycle) is compared with
// the two key patterns. A write of 0xAAAA arms the comparator; if the very
// next write is 0x5555, key_ok is high (combinationally) during that
// second write, for one cycle. Any other write disarms it, so a runaway program that writes random
// data is very unlikely to produce the key. key_ok is the write enable of
// the configuration register. The two patterns follow the block diagram; the
// rule that they must be consecutive writes is this design's choice.
//
// hold clears the comparator (used while the configuration register is
// taking data words, so that data cannot be mistaken for a key).
module pattern_comparator
  import wdt_pkg::*;
(
  input  logic              sysclk,
  input  logic              rst_n,
  input  logic              hold,
  input  logic              wr_strobe,
  input  logic [DATA_W-1:0] dbus,
  output logic              key_ok
);

  logic armed;

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n) begin
      armed <= 1'b0;
    end else if (hold) begin
      armed <= 1'b0;
    end else if (wr_strobe) begin
      armed <= (dbus == KEY_FIRST);
    end
  end

  assign key_ok = !hold && wr_strobe && armed && (dbus == KEY_SECOND);

endmodule
