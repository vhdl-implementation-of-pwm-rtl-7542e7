// clock_divider: clock-enable generator for the PWM counters.
//
// A counter runs 0..DIV-1 on the board clock and `tick` is high for one
// clock when it reaches DIV-1, i.e. once every DIV clocks (always high for
// DIV = 1). Everything downstream stays on the board clock and advances
// only on `tick`, which keeps the design on a single clock. Synchronous
// active-high reset restarts the count at zero.
//
// The source only names a clock divider entity; its ratio and the
// clock-enable form are this design's choices (DIV = 100 turns a 50 MHz
// board clock into a 500 kHz counter rate, a 977 Hz PWM carrier).
module clock_divider #(
  parameter int unsigned DIV = 100
) (
  input  logic clock,
  input  logic reset,
  output logic tick
);

  localparam int unsigned W = (DIV > 1) ? $clog2(DIV) : 1;

  logic [W-1:0] count;

  always_ff @(posedge clock) begin
    if (reset || count == W'(DIV - 1))
      count <= '0;
    else
      count <= count + 1'b1;
  end

  assign tick = (count == W'(DIV - 1));

  initial assert (DIV >= 1) else $error("DIV must be at least 1");

endmodule
