// cos_lut: synchronous cosine look-up table.
//
// `addr` is the 8 most significant bits of a phase word (code i means
// i*360/255 degrees). `data` is floor(127 + 127*cos(angle)) one clock
// later, so 127 stands for 0, 254 for +1 and 0 for -1; for example
// address 85 (120 degrees) reads 63. Because cos(i) = cos(255-i) only
// addresses 0..127 are stored: an upper-half address is folded by
// inverting it. The table contents are computed at elaboration from the
// formula in vvvf_pkg.
//
// The offset, scaling, 8-bit addressing and half-table symmetry follow the
// source description; the registered read port is this design's choice.
module cos_lut
  import vvvf_pkg::*;
(
  input  logic              clock,
  input  logic [7:0]        addr,
  output logic [DATA_W-1:0] data
);

  localparam cos_rom_t ROM = make_cos_rom();

  logic [6:0] folded;
  assign folded = addr[7] ? ~addr[6:0] : addr[6:0];

  always_ff @(posedge clock)
    data <= ROM[folded];

endmodule
