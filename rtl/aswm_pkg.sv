// aswm_pkg: types and fixed-point formats shared by the pipelined ASWM
// (adaptive switching weighted median) filter.
//
// Number formats used across the pipeline:
//   pixel_t  : 8-bit unsigned monochrome pixel.
//   mean_t   : weighted mean M_w in unsigned 8.8 fixed point (16 bits).
//   weight_t : weight w_kl, 32-bit unsigned integer read from the reciprocal
//              table; the value 2**28 stands for a weight of 1.0.
//   sigma_t  : weighted standard deviation in unsigned 8.4 (12 bits).
//   alpha_t  : noise threshold alpha in unsigned 4.4 (8 bits).
// The 3x3 window is stored row-major: element 3*row+col, row 0 on top,
// col 0 on the left, so element 4 is the pixel being filtered.
// The 3x3 window, the 8-bit pixels and the 32-bit weight table follow the
// filter's description (nine divisions per estimation unit, 8-bit table
// address, 32-bit table word); the other formats are this design's choice.
package aswm_pkg;

  localparam int unsigned PIX_W   = 8;
  localparam int unsigned WIN_N   = 9;
  localparam int unsigned MEAN_W  = 16;   // 8.8
  localparam int unsigned MEAN_FR = 8;
  localparam int unsigned WGT_W   = 32;
  localparam int unsigned SIG_W   = 12;   // 8.4
  localparam int unsigned ALPHA_W = 8;    // 4.4

  // Weight table: w(d) = floor(2**31 / (8*d + 1)) = 2**28 / (d + 1/8),
  // i.e. the scaled value of 1/(d + delta) with delta = 0.125.
  localparam logic [WGT_W-1:0] WEIGHT_ONE = 32'h1000_0000;
  localparam longint unsigned  RECIP_NUM  = 64'h8000_0000;
  localparam int unsigned      DELTA_DEN  = 8;

  // Sums over the window: nine weights need 36 bits, nine weight*pixel
  // products 43 bits.
  localparam int unsigned WSUM_W  = WGT_W + 4;
  localparam int unsigned WXSUM_W = WGT_W + PIX_W + 4;

  typedef logic [PIX_W-1:0]   pixel_t;
  typedef logic [MEAN_W-1:0]  mean_t;
  typedef logic [WGT_W-1:0]   weight_t;
  typedef logic [SIG_W-1:0]   sigma_t;
  typedef logic [ALPHA_W-1:0] alpha_t;

  typedef pixel_t  [WIN_N-1:0] window_t;
  typedef weight_t [WIN_N-1:0] weights_t;

  // State of one pixel as it travels along the chain of estimation units.
  typedef struct packed {
    window_t  win;       // the 3x3 window
    weights_t w;         // current weights
    mean_t    mw;        // current weighted mean
    logic     done;      // early-exit (bypass) flag: loop has converged
  } est_t;

  localparam int unsigned EST_W = $bits(est_t);

  // Table contents, also used by testbenches as the documented formula.
  function automatic weight_t recip_entry(input int unsigned d);
    return weight_t'(RECIP_NUM / longint'(DELTA_DEN * d + 1));
  endfunction

endpackage
