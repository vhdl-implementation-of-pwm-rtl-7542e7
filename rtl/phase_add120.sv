// phase_add120: shifts a phase word by +120 degrees.
//
// Purely combinational: phout = phin + 0101010101b (341 = 1023/3) modulo
// 1024. Chaining two of these behind the oscillator gives the three phases
// of a three-phase system. The constant and width follow the source
// description.
module phase_add120
  import vvvf_pkg::*;
(
  input  logic [PHASE_W-1:0] phin,
  output logic [PHASE_W-1:0] phout
);

  assign phout = phin + PHASE_120;

endmodule
