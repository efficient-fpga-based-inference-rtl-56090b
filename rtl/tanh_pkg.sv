// tanh_pkg: shared types of the DCT-interpolation tanh unit.
//
// The input range of tanh is split into four cases, encoded on the two
// select lines S2,S1 that drive the output multiplexer:
//   REG_PASS    tanh(z) ~ z, the input fraction bits are passed through
//   REG_SAT     tanh(z) ~ 1, the output is all ones
//   REG_SAMPLE  z falls on a stored sample point, the sample is output
//   REG_INTERP  z falls between samples and is interpolated
// The four cases follow the published design; the binary code of each is this
// design's choice.
package tanh_pkg;
  typedef enum logic [1:0] {
    REG_PASS   = 2'b00,
    REG_SAT    = 2'b01,
    REG_SAMPLE = 2'b10,
    REG_INTERP = 2'b11
  } region_e;
endpackage
