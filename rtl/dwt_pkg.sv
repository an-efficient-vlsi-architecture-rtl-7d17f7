// dwt_pkg: types and default sizes shared by the 5/3 lifting DWT engine.
//
// The engine transforms a tile of N x N samples, or a volume of F such tiles
// (frames), with the 5/3 lifting wavelet: along rows only (1D), rows and columns
// (2D) or rows, columns and frames (3D), over one or more resolution levels, in
// the forward or the inverse direction. The 5/3 wavelet, the lifting steps and
// the 1D/2D/3D multi-level operation follow the description of the design; the
// 8 x 8 tile with 8-bit pixels is the worked example it uses. The frame count,
// internal word width and fixed-point format of the scaling constants are this
// implementation's own choices.
package dwt_pkg;

  // Default geometry: an 8 x 8 tile, 8 frames deep for the 3D transform.
  localparam int unsigned DWT_N = 8;   // samples per row and rows per frame
  localparam int unsigned DWT_F = 8;   // frames in a volume (3D transform)
  localparam int unsigned DWT_W = 16;  // signed word width of samples and coefficients

  // Scaling constants k and 1/k in unsigned fixed point with DWT_QF fraction
  // bits. The integer (reversible) 5/3 transform uses k = 1.
  localparam int unsigned DWT_QF  = 14;
  localparam int unsigned DWT_KW  = 16;
  localparam logic [DWT_KW-1:0] DWT_K_ONE = 16'd16384;

  // Which axes are transformed.
  typedef enum logic [1:0] {
    DIMS_NONE = 2'd0,  // no transform: the volume is passed through
    DIMS_1D   = 2'd1,  // rows
    DIMS_2D   = 2'd2,  // rows, then columns
    DIMS_3D   = 2'd3   // rows, then columns, then frames
  } dwt_dims_e;

  // Per-run configuration, sampled when a run is started.
  typedef struct packed {
    logic      inverse;  // 0: analysis (forward), 1: synthesis (inverse)
    dwt_dims_e dims;     // number of transformed axes
    logic [2:0] levels;  // resolution levels (clamped to what the sizes allow)
  } dwt_cfg_t;

endpackage
