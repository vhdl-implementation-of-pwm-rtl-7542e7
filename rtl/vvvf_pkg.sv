// vvvf_pkg: widths, constants, types and table generators shared by the
// three-phase sinusoidal-PWM (SPWM) variable-voltage variable-frequency
// controller.
//
// Angle convention: a 10-bit phase word spans one electrical period, with
// all-ones standing for 360 degrees, so code k means k*360/1023 degrees.
// The 8-bit amplitude angle uses the same units (it is added to the phase
// directly), so its full-scale code 255 is just under 90 degrees. The
// cosine table is addressed by the 8 most significant phase bits, whose
// code i means i*360/255 degrees; with that scale cos(i) = cos(255-i), so
// only addresses 0..127 need storage.
package vvvf_pkg;

  localparam int unsigned DATA_W  = 8;   // data bus, frequency, amplitude
  localparam int unsigned PHASE_W = 10;  // phase accumulator
  localparam int unsigned CNT_W   = 9;   // PWM counter, 0..511

  // 120 degrees in phase units: 0101010101b = 341 (= 1023/3).
  localparam logic [PHASE_W-1:0] PHASE_120 = 10'b01_0101_0101;

  // Cosine table offset: 127 stands for 0, 254 for +1, 0 for -1.
  localparam logic [DATA_W-1:0] COS_MID = 8'd127;

  // Meaning of the 2-bit select input when enable is high.
  typedef enum logic [1:0] {
    SEL_AMPLITUDE = 2'b00,
    SEL_FREQUENCY = 2'b01,
    SEL_PHASE_LO  = 2'b10,  // phase bits [7:0]
    SEL_PHASE_HI  = 2'b11   // phase bits [9:8]
  } sel_e;

  localparam real PI = 3.14159265358979323846;

  typedef logic [DATA_W-1:0] cos_rom_t [128];

  // Stored half of the cosine table: floor(127 + 127*cos(2*pi*i/255)).
  function automatic cos_rom_t make_cos_rom();
    cos_rom_t r;
    for (int i = 0; i < 128; i++) begin
      real v;
      v = 127.0 + 127.0 * $cos(2.0 * PI * real'(i) / 255.0);
      r[i] = DATA_W'($rtoi($floor(v + 1.0e-9)));
    end
    return r;
  endfunction

  typedef logic [DATA_W-1:0] vf_rom_t [256];

  // Volts-per-hertz profile. The modulation index is m = min(f/f_base, 1)
  // and the stored amplitude angle is phi = acos(m) in phase units
  // (1023 per turn), rounded and limited to 255.
  function automatic vf_rom_t make_vf_rom(int unsigned f_base);
    vf_rom_t r;
    for (int f = 0; f < 256; f++) begin
      real m;
      int  phi;
      m = real'(f) / real'(f_base);
      if (m > 1.0) m = 1.0;
      phi = $rtoi($acos(m) * 1023.0 / (2.0 * PI) + 0.5);
      if (phi > 255) phi = 255;
      r[f] = DATA_W'(phi);
    end
    return r;
  endfunction

endpackage
