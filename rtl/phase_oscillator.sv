// phase_oscillator: phase accumulator producing a sawtooth from 0 to 360
// degrees.
//
// On every clock where `tick` (the oscillator clock, 1/512 of the PWM
// counter rate) is high, the register loads `phase_in + freq`; the 10-bit
// sum drops its carry, so the phase wraps past 360 degrees back towards
// zero and the sawtooth repeats every 1024/freq ticks. In the controller
// `phase_in` comes back through the interface block: it is this register's
// own output during normal running and the programmed initial phase while
// the interface is being written. Synchronous active-high reset clears the
// phase to zero.
//
// The adder of an 8-bit frequency to a 10-bit phase and the per-tick
// increment follow the source description. Using a clock enable from the
// PWM counter instead of a separate divided clock, and keeping the
// remainder at the wrap (modulo-1024 arithmetic) rather than forcing zero,
// are this design's choices.
module phase_oscillator
  import vvvf_pkg::*;
(
  input  logic               clock,
  input  logic               reset,
  input  logic               tick,
  input  logic [DATA_W-1:0]  freq,
  input  logic [PHASE_W-1:0] phase_in,
  output logic [PHASE_W-1:0] phase
);

  always_ff @(posedge clock) begin
    if (reset)
      phase <= '0;
    else if (tick)
      phase <= phase_in + PHASE_W'(freq);
  end

endmodule
