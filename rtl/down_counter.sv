// Down counter: turns a watchdog failure into a reset pulse for the processor.
//
// On every wdfail pulse the counter is loaded with RST_LEN and counts down by
// one per SYSCLK cycle; rstout is high while the count is not zero, so the
// processor's reset is held for RST_LEN cycles starting the cycle after the
// failure. A failure during the pulse reloads the count and so lengthens it.
// The pulse length is this design's choice; the text does not give one.
module down_counter #(
  parameter int unsigned RST_LEN = 16
) (
  input  logic sysclk,
  input  logic rst_n,
  input  logic wdfail,
  output logic rstout
);

  localparam int unsigned CW = $clog2(RST_LEN + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge sysclk or negedge rst_n) begin
    if (!rst_n)          cnt <= '0;
    else if (wdfail)     cnt <= CW'(RST_LEN);
    else if (cnt != '0)  cnt <= cnt - 1'b1;
  end

  assign rstout = (cnt != '0);

endmodule
