// conv_pkg: constants and types of the convolution-based floating-point DWT
// engine.
//
// The engine filters with a four-tap low-pass filter H and a four-tap
// high-pass filter G (coefficients h0..h3 and g0..g3, as in the design
// description). The description does not print their values; this
// implementation uses the Daubechies 4-tap (D4) wavelet:
//   h = [1+sqrt3, 3+sqrt3, 3-sqrt3, 1-sqrt3] / (4*sqrt2)
//   g = [h3, -h2, h1, -h0]
// each rounded to the nearest IEEE 754 single-precision value below.
package conv_pkg;

  localparam int unsigned CONV_N = 8;  // samples per line, lines per tile

  // coefficient select s1: 0..3 pick h0..h3, 4..7 pick g0..g3
  localparam logic [31:0] CONV_COEF [8] = '{
    32'h3ef746ea,  // h0 =  0.48296291
    32'h3f5625ef,  // h1 =  0.83651630
    32'h3e6585f8,  // h2 =  0.22414387
    32'hbe0483ee,  // h3 = -0.12940952
    32'hbe0483ee,  // g0 = -0.12940952
    32'hbe6585f8,  // g1 = -0.22414387
    32'h3f5625ef,  // g2 =  0.83651630
    32'hbef746ea   // g3 = -0.48296291
  };

  // One word of the select-line table, read at address Addr in every cycle.
  typedef struct packed {
    logic       mac_en;  // issue a tap to the MAC
    logic       init;    // 1: multiply only (first tap), 0: multiply-accumulate
    logic [2:0] s0;      // sample select
    logic [2:0] s1;      // coefficient select
    logic       wr;      // store the finished sum in the output register widx
    logic [2:0] widx;
    logic       commit;  // copy the outputs of this level over the working line
    logic [3:0] clen;    // number of words copied by commit
    logic       last;    // last word of a level
  } conv_sel_t;

endpackage
