// vvvf_interface: input demultiplexer of the SPWM controller.
//
// The controller is configured over one 8-bit bus. While `en` is high, the
// byte on `data_in` is written, at each rising clock edge, into the register
// chosen by `sel`: 00 amplitude, 01 frequency, 10 low eight bits of the
// initial phase, 11 high two bits of the initial phase (taken from
// data_in[1:0]). While `en` is low the registers hold.
//
// The `phase` output closes the oscillator loop: with `en` low it is the
// oscillator's own phase (`phasein`), so the oscillator runs freely; with
// `en` high it is the stored initial phase, so the oscillator is held at
// that phase (plus one increment) until `en` falls. The registered values
// appear on the outputs one clock after the write. Synchronous active-high
// reset clears all three registers (initial phase zero by default).
//
// The select encoding, the en/phasein behaviour and the widths follow the
// source description; the clocked registers, the reset and the choice of
// data_in[1:0] for the two high phase bits are this design's own.
module vvvf_interface
  import vvvf_pkg::*;
(
  input  logic               clock,
  input  logic               reset,
  input  logic [DATA_W-1:0]  data_in,
  input  sel_e               sel,
  input  logic               en,
  input  logic [PHASE_W-1:0] phasein,
  output logic [DATA_W-1:0]  freq,
  output logic [DATA_W-1:0]  amp,
  output logic [PHASE_W-1:0] phase
);

  logic [PHASE_W-1:0] phase_init;

  always_ff @(posedge clock) begin
    if (reset) begin
      freq       <= '0;
      amp        <= '0;
      phase_init <= '0;
    end else if (en) begin
      unique case (sel)
        SEL_AMPLITUDE: amp              <= data_in;
        SEL_FREQUENCY: freq             <= data_in;
        SEL_PHASE_LO:  phase_init[7:0]  <= data_in;
        SEL_PHASE_HI:  phase_init[9:8]  <= data_in[1:0];
      endcase
    end
  end

  assign phase = en ? phase_init : phasein;

endmodule
