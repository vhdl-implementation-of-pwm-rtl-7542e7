// vvvf: three-phase sinusoidal-PWM variable-voltage variable-frequency
// controller for an inverter-fed induction motor.
//
// Configuration arrives over an 8-bit bus with a 2-bit select and an
// enable (see vvvf_interface). A phase accumulator (phase_oscillator)
// advances by the frequency word once per PWM carrier period; two +120
// degree adders derive the other two phases. amplitude_module turns each
// phase into 127 + 127*cos(phi)*cos(theta) using one shared cosine table,
// and one counter_comparator per phase turns that value into an SPWM pulse
// and the two gate pulses of its inverter leg. The first counter's wrap
// strobe is the oscillator clock. clock_divider sets the counter rate.
//
// Amplitude source: with USE_VF_LUT = 0 the amplitude angle is the one
// written over the bus (select 00); with USE_VF_LUT = 1 it is taken from
// the volts-per-hertz table driven by the frequency word.
//
// Output numbering: pulse[k] is the SPWM pulse of phase k+1 (phase 1 is the
// oscillator output, phase 2 = phase 1 + 120, phase 3 = phase 2 + 120).
// gate[0], gate[1] belong to phase 3, gate[2], gate[3] to phase 2 and
// gate[4], gate[5] to phase 1, in the order (positive-half switch,
// negative-half switch), following the block diagram's pulse labels.
//
// Timing: everything runs on `clock` with clock enables. One carrier period
// is 512*DIV clocks; the output frequency is
//   f_out = f_clock * freq / (DIV * 512 * 1024).
// Synchronous active-high reset.
module vvvf
  import vvvf_pkg::*;
#(
  parameter int unsigned DIV        = 100,
  parameter int unsigned F_BASE     = 52,
  parameter bit          USE_VF_LUT = 1'b0
) (
  input  logic              clock,
  input  logic              reset,
  input  logic [DATA_W-1:0] data_in,
  input  logic [1:0]        sel,
  input  logic              en,
  output logic [2:0]        pulse,
  output logic [5:0]        gate
);

  logic [DATA_W-1:0]  freq, amp_bus, amp_vf, amp;
  logic [PHASE_W-1:0] phase_src;
  logic [PHASE_W-1:0] phase [3];
  logic [DATA_W-1:0]  wave  [3];
  logic               cnt_tick;
  logic [2:0]         osc_tick;
  logic [2:0]         gate_p, gate_n;

  vvvf_interface u_interface (
    .clock   (clock),
    .reset   (reset),
    .data_in (data_in),
    .sel     (sel_e'(sel)),
    .en      (en),
    .phasein (phase[0]),
    .freq    (freq),
    .amp     (amp_bus),
    .phase   (phase_src)
  );

  clock_divider #(.DIV(DIV)) u_divider (
    .clock (clock),
    .reset (reset),
    .tick  (cnt_tick)
  );

  phase_oscillator u_oscillator (
    .clock    (clock),
    .reset    (reset),
    .tick     (osc_tick[0]),
    .freq     (freq),
    .phase_in (phase_src),
    .phase    (phase[0])
  );

  phase_add120 u_add2 (.phin(phase[0]), .phout(phase[1]));
  phase_add120 u_add3 (.phin(phase[1]), .phout(phase[2]));

  vf_amplitude_lut #(.F_BASE(F_BASE)) u_vf (
    .freq (freq),
    .amp  (amp_vf)
  );

  assign amp = USE_VF_LUT ? amp_vf : amp_bus;

  amplitude_module u_amplitude (
    .clock (clock),
    .reset (reset),
    .amp   (amp),
    .phase (phase),
    .out   (wave)
  );

  for (genvar k = 0; k < 3; k++) begin : g_pwm
    counter_comparator u_pwm (
      .clock    (clock),
      .reset    (reset),
      .tick     (cnt_tick),
      .inp      (wave[k]),
      .out      (pulse[k]),
      .gate_p   (gate_p[k]),
      .gate_n   (gate_n[k]),
      .osc_tick (osc_tick[k])
    );
    assign gate[4-2*k] = gate_p[k];
    assign gate[5-2*k] = gate_n[k];
  end

endmodule
