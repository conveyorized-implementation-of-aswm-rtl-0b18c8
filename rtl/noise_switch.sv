// noise_switch: the switching rule of the ASWM filter, eq. (4).
//
// The centre pixel X is declared noisy when |X - M_w| > alpha * sigma_w,
// with M_w the converged weighted mean and sigma_w the weighted standard
// deviation. A noisy pixel is replaced by the window median, any other
// pixel passes unchanged. |X - M_w| is formed in 8.8 fixed point and
// alpha (4.4) times sigma (8.4) gives a 12.8 threshold, so the comparison
// is exact in these formats. alpha is a run-time input because the filter
// description leaves it as a preset threshold.
//
// Timing: one pixel per clock, latency 1 cycle. Only valid is reset.
module noise_switch
  import aswm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  pixel_t in_xc,      // centre pixel X_ij
  input  mean_t  in_mw,      // weighted mean, 8.8
  input  sigma_t in_sigma,   // weighted standard deviation, 8.4
  input  pixel_t in_med,     // window median m_ij
  input  alpha_t alpha,      // threshold, 4.4
  output logic   out_valid,
  output pixel_t out_pix,    // filtered pixel Y_ij
  output logic   out_noisy   // 1: pixel was replaced by the median
);

  logic [MEAN_W-1:0]        dev;
  logic [SIG_W+ALPHA_W-1:0] thr;
  logic                     noisy;

  always_comb begin
    logic [MEAN_W-1:0] xs;
    xs    = {in_xc, 8'h00};
    dev   = (xs >= in_mw) ? xs - in_mw : in_mw - xs;
    thr   = (SIG_W+ALPHA_W)'(in_sigma) * (SIG_W+ALPHA_W)'(alpha);
    noisy = (SIG_W+ALPHA_W)'(dev) > thr;
  end

  always_ff @(posedge clk) begin
    out_pix   <= noisy ? in_med : in_xc;
    out_noisy <= noisy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
