// fir_pkg: types, widths, coefficient set and helper functions shared by the
// multiple-datapath low-power FIR cores.
//
// Word sizes follow the 16x16-bit multipliers of the cores: 16-bit samples
// and coefficients, 32-bit products.  The accumulator width (40 bits), the
// 5-bit shift code and the coefficient set are choices of this design.
//
// Coefficient segmentation: every coefficient h is split as h = m + s, where
// m >= 0 is as small as possible and s = +/-2^k.  m goes to the multiplier and
// s to a shifter.  s is coded in SW = 5 bits: bit 4 is the sign (1 = negative)
// and bits 3:0 are k.  Example with an 8-bit coefficient: 11110001 (-15)
// becomes m = 00000001 and s = 1_0100 (-2^4).  A zero coefficient is coded
// m = 1, s = -2^0, so the two branches cancel.
//
// BP73 is a 73-tap band-pass filter (pass band 0.2 to 0.4 of the Nyquist
// frequency): h[n] = round(32768 * w[n] * (sin(0.4*pi*k) - sin(0.2*pi*k))/(pi*k)),
// k = n - 36, with the k = 0 term 0.2 and the Hamming window
// w[n] = 0.54 - 0.46*cos(2*pi*n/72).
package fir_pkg;

  localparam int XW    = 16;   // data sample width
  localparam int HW    = 16;   // coefficient width
  localparam int PW    = 32;   // product width
  localparam int ACC_W = 40;   // accumulator / output width
  localparam int SW    = 5;    // shift code width: sign + 4-bit shift amount

  typedef enum logic [1:0] {
    ALG_CSEG = 2'd0,   // coefficient segmentation
    ALG_BP   = 2'd1,   // block processing, block size 2
    ALG_COMB = 2'd2    // segmentation and block processing combined
  } alg_e;

  typedef struct packed {
    logic [HW-1:0] m;   // multiplier part, never negative
    logic [SW-1:0] s;   // shifter part: {sign, shift}
  } seg_t;


  localparam int N_DEFAULT = 73;

  localparam logic signed [HW-1:0] BP73 [N_DEFAULT] = '{
    16'sd36, 16'sd0, -16'sd41, -16'sd47, -16'sd13, 16'sd15, 16'sd0, -16'sd21,
    16'sd25, 16'sd128, 16'sd151, 16'sd0, -16'sd207, -16'sd241, -16'sd66, 16'sd76,
    16'sd0, -16'sd100, 16'sd114, 16'sd548, 16'sd622, 16'sd0, -16'sd799, -16'sd907,
    -16'sd243, 16'sd277, 16'sd0, -16'sd364, 16'sd423, 16'sd2102, 16'sd2510, 16'sd0,
    -16'sd3901, -16'sd5266, -16'sd1881, 16'sd3782, 16'sd6554, 16'sd3782, -16'sd1881, -16'sd5266,
    -16'sd3901, 16'sd0, 16'sd2510, 16'sd2102, 16'sd423, -16'sd364, 16'sd0, 16'sd277,
    -16'sd243, -16'sd907, -16'sd799, 16'sd0, 16'sd622, 16'sd548, 16'sd114, -16'sd100,
    16'sd0, 16'sd76, -16'sd66, -16'sd241, -16'sd207, 16'sd0, 16'sd151, 16'sd128,
    16'sd25, -16'sd21, 16'sd0, 16'sd15, -16'sd13, -16'sd47, -16'sd41, 16'sd0,
    16'sd36
  };

  // Number of coefficient steps per output with m datapaths: ceil(n/m).
  function automatic int steps(input int n, input int m);
    return (n + m - 1) / m;
  endfunction

  // Split a coefficient into (m, s) with h = m + s, m >= 0 minimal, s = +/-2^k.
  function automatic seg_t segment(input logic signed [HW-1:0] h);
    seg_t r;
    int   k;
    int   hv;
    hv = int'(h);
    r  = '0;
    if (hv > 0) begin
      // largest 2^k <= h
      k = 0;
      for (int i = 0; i < HW - 1; i++) if ((hv >> i) != 0) k = i;
      r.s = {1'b0, 4'(k)};
      r.m = HW'(hv - (1 << k));
    end else begin
      // smallest 2^k >= -h (k = 0 for h = 0 and h = -1)
      k = 0;
      for (int i = HW - 1; i >= 0; i--) if ((1 << i) >= -hv) k = i;
      r.s = {1'b1, 4'(k)};
      r.m = HW'(hv + (1 << k));
    end
    return r;
  endfunction

  // (a - b) modulo d, for 0 <= a < d and 0 <= b < d.
  function automatic int wrap_sub(input int a, input int b, input int d);
    return (a >= b) ? a - b : a - b + d;
  endfunction

endpackage
