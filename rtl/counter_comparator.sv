// counter_comparator: the PWM module of one phase.
//
// A 9-bit counter steps 0..511 on each clock where `tick` is high. The
// input is latched once per carrier period, on the tick that wraps the
// counter, and for the whole following period the comparator drives `out`
// low while (256 - v) <= count < (256 + v) and high otherwise, v being the
// latched value. Each 512-count carrier period thus holds one low pulse of
// width 2*v, symmetric about the middle of the period (between counts 255
// and 256), which gives the quarter-wave and half-wave symmetry. With the
// offset cosine input (127 = 0) the high duty is 1 - v/256, i.e. about
// 50 % at a zero of the sine. `osc_tick` pulses for one clock on the tick that wraps
// the counter from 511 to 0: it is the oscillator clock, 1/512 of the
// counter rate.
//
// The two gate pulses of the inverter leg are split at the zero crossing of
// the sinusoid (v above 127 = positive half): during the positive half
// `gate_p` carries the SPWM pulse and `gate_n` is off, during the negative
// half `gate_n` carries the inverted SPWM pulse and `gate_p` is off. The
// two are never high together.
//
// Timing: a new `inp` takes effect in the carrier period that starts after
// the next counter wrap. `out`, `gate_p` and `gate_n` are registered and
// follow the count with one clock of delay. Synchronous active-high reset
// clears the count, sets v to 127 and holds all outputs low.
//
// The count range, the window comparison and the zero-crossing split follow
// the source description. The half-open window, the registered outputs,
// the clock-enable form of the oscillator clock and the once-per-period
// input latch are this design's choices; the latch keeps one value per
// period so that a sign change of the sinusoid cannot leave a sliver of a
// gate pulse at the start of a period while the amplitude module is still
// updating.
module counter_comparator
  import vvvf_pkg::*;
(
  input  logic              clock,
  input  logic              reset,
  input  logic              tick,
  input  logic [DATA_W-1:0] inp,
  output logic              out,
  output logic              gate_p,
  output logic              gate_n,
  output logic              osc_tick
);

  localparam logic [CNT_W:0] CENTER = 10'd256;

  logic [CNT_W-1:0]  count;
  logic [DATA_W-1:0] level;
  logic             in_window;
  logic             pwm;
  logic             positive;

  assign osc_tick = tick && (count == '1);

  always_ff @(posedge clock) begin
    if (reset) begin
      count <= '0;
      level <= COS_MID;
    end else begin
      if (tick)
        count <= count + 1'b1;   // wraps 511 -> 0
      if (osc_tick)
        level <= inp;
    end
  end

  assign in_window = ({1'b0, count} >= CENTER - (CNT_W+1)'(level)) &&
                     ({1'b0, count} <  CENTER + (CNT_W+1)'(level));
  assign pwm       = !in_window;
  assign positive  = (level > COS_MID);

  always_ff @(posedge clock) begin
    if (reset) begin
      out    <= 1'b0;
      gate_p <= 1'b0;
      gate_n <= 1'b0;
    end else begin
      out    <= pwm;
      gate_p <= positive  &&  pwm;
      gate_n <= !positive && !pwm;
    end
  end

  assert property (@(posedge clock) disable iff (reset) !(gate_p && gate_n))
    else $error("both switches of the leg are on");

endmodule
