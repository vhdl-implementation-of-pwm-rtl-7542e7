// vf_amplitude_lut: volts-per-hertz profile table.
//
// Maps the 8-bit frequency word to the 8-bit amplitude angle phi consumed
// by amplitude_module, where cos(phi) is the modulation index m. The index
// is 1 (phi = 0) at and above the base frequency word F_BASE and falls
// linearly with frequency below it, m = f/F_BASE, so the output voltage
// keeps a constant ratio to frequency. phi = acos(m) in phase units (1023
// per turn), rounded, limited to 255. The 256-entry table is computed at
// elaboration (vvvf_pkg::make_vf_rom) and read combinationally.
//
// The profile (index 1 at and above 50 Hz, linear below) and the coding of
// the index as a cosine angle follow the source description. F_BASE is this
// design's choice: with a 50 MHz board clock divided by 100 the frequency
// word has a resolution of 50e6/100/512/1024 = 0.954 Hz, so 50 Hz is word 52.
module vf_amplitude_lut
  import vvvf_pkg::*;
#(
  parameter int unsigned F_BASE = 52
) (
  input  logic [DATA_W-1:0] freq,
  output logic [DATA_W-1:0] amp
);

  localparam vf_rom_t ROM = make_vf_rom(F_BASE);

  assign amp = ROM[freq];

endmodule
