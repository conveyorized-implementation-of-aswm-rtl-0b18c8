// aswm_filter: fully pipelined adaptive switching weighted median (ASWM)
// filter for monochrome images, one pixel per clock.
//
// The iterative weight estimation of ASWM, a loop of unknown length, is
// unrolled into a chain of N_UNITS identical weight estimation units. A
// unit whose predecessor has already met the convergence test is bypassed,
// which reproduces the loop's early exit; if no unit converges the last
// unit's weights are used. The pipeline is
//
//   window_gen -> mean_unit -> weight_est_unit x N_UNITS -> deviation_unit
//                                                    \-> median3x3 -> delay -> noise_switch
//
// and the switch replaces the centre pixel by the window median when
// |X - M_w| > alpha * sigma_w (eq. (4)), otherwise passes it unchanged.
//
// Interface: in_pix/in_valid is a raster stream, IMG_W x IMG_H per frame,
// frames sent whole; only interior pixels ((IMG_W-2) x (IMG_H-2) per
// frame) come out, in raster order, on out_pix/out_valid. alpha is the
// 4.4 fixed-point noise threshold. out_noisy marks a replaced pixel and
// out_early marks a pixel whose loop ended before the last unit.
//
// Timing: latency from the window to the output is 30 + 5*N_UNITS cycles
// (2 initial mean, 5 per unit, 27 deviation, 1 switch), e.g. 155 for the
// default 25 units, plus 1 cycle in window_gen. No stalls. The chain, the
// bypass, the table division and the latency figures follow the filter
// description; 25 units is the count it names as needed for filtering
// quality. The window border handling, fixed-point formats and EPS are
// this design's choice.
module aswm_filter
  import aswm_pkg::*;
#(
  parameter int unsigned IMG_W   = 1920,
  parameter int unsigned IMG_H   = 1080,
  parameter int unsigned N_UNITS = 25,
  parameter mean_t       EPS     = 16'd26
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  pixel_t in_pix,
  input  alpha_t alpha,
  output logic   out_valid,
  output pixel_t out_pix,
  output logic   out_noisy,
  output logic   out_early
);

  localparam int unsigned MED_DELAY = 27 - 3;   // deviation minus median latency

  // ---- window and initial mean ---------------------------------------------
  logic    win_vld;
  window_t win;

  window_gen #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_win (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_pix(in_pix),
    .out_valid(win_vld), .out_win(win)
  );

  logic chain_vld [N_UNITS+1];
  est_t chain_est [N_UNITS+1];

  mean_unit u_mean (
    .clk(clk), .rst_n(rst_n), .in_valid(win_vld), .in_win(win),
    .out_valid(chain_vld[0]), .out_est(chain_est[0])
  );

  // ---- chain of weight estimation units ------------------------------------
  for (genvar u = 0; u < int'(N_UNITS); u++) begin : g_unit
    weight_est_unit #(.EPS(EPS)) u_est (
      .clk(clk), .rst_n(rst_n),
      .in_valid (chain_vld[u]),   .in_est (chain_est[u]),
      .out_valid(chain_vld[u+1]), .out_est(chain_est[u+1])
    );
  end

  // ---- deviation and median ------------------------------------------------
  logic   dev_vld, dev_done;
  sigma_t dev_sigma;
  mean_t  dev_mw;
  pixel_t dev_xc;

  deviation_unit u_dev (
    .clk(clk), .rst_n(rst_n),
    .in_valid(chain_vld[N_UNITS]), .in_est(chain_est[N_UNITS]),
    .out_valid(dev_vld), .out_sigma(dev_sigma), .out_mw(dev_mw),
    .out_xc(dev_xc), .out_done(dev_done)
  );

  logic   med_vld, medd_vld;
  pixel_t med, medd;

  median3x3 u_med (
    .clk(clk), .rst_n(rst_n),
    .in_valid(chain_vld[N_UNITS]), .in_win(chain_est[N_UNITS].win),
    .out_valid(med_vld), .out_med(med)
  );

  delay_line #(.W(PIX_W), .DEPTH(MED_DELAY)) u_med_dly (
    .clk(clk), .rst_n(rst_n), .in_valid(med_vld), .in_data(med),
    .out_valid(medd_vld), .out_data(medd)
  );

  // ---- switch --------------------------------------------------------------
  logic early_q;

  noise_switch u_sw (
    .clk(clk), .rst_n(rst_n), .in_valid(dev_vld),
    .in_xc(dev_xc), .in_mw(dev_mw), .in_sigma(dev_sigma), .in_med(medd),
    .alpha(alpha),
    .out_valid(out_valid), .out_pix(out_pix), .out_noisy(out_noisy)
  );

  always_ff @(posedge clk) early_q <= dev_done;
  assign out_early = early_q;

  // The median delay line must stay in step with the deviation unit.
  a_med_in_step: assert property (@(posedge clk) medd_vld == dev_vld)
    else $error("aswm_filter: median out of step");

endmodule
