// seg_shift: the shifter branch of a coefficient-segmentation datapath.
//
// Multiplies a data sample x by the power-of-two part s of a segmented
// coefficient without a multiplier: xconv forms the two's complement -x, a
// mux picks x or -x by the sign bit s[4], and a left shifter shifts the choice
// by s[3:0].  Combinational; y = x * (s[4] ? -1 : 1) * 2^s[3:0] in 32 bits.
// The xconv/mux/shift structure follows the segmentation datapath; the 5-bit
// code and the output width are this design's choice.
module seg_shift
  import fir_pkg::*;
(
  input  logic signed [XW-1:0] x,
  input  logic        [SW-1:0] s,
  output logic signed [PW-1:0] y
);
  logic signed [PW-1:0] xe;     // x sign-extended
  logic signed [PW-1:0] xconv;  // -x
  logic signed [PW-1:0] xsel;

  assign xe    = PW'(x);
  assign xconv = -xe;
  assign xsel  = s[SW-1] ? xconv : xe;
  assign y     = xsel <<< s[SW-2:0];
endmodule
