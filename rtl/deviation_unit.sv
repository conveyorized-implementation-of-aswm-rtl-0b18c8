// deviation_unit: weighted standard deviation sigma_w of the window, eq. (3):
//   sigma_w = sqrt( sum(w_k (X_k - M_w)^2) / sum(w_k) )
// computed from the weights and mean left by the last weight estimation
// unit. The squared deviations are kept in 16.8 fixed point, so the
// quotient (the weighted variance) is 16.8 and its integer square root is
// sigma in 8.4.
//
// Pipeline, one window per clock, latency 27 cycles:
//   1       squared deviations (X_k - M_w)^2
//   2       products w_k (X_k - M_w)^2 and the weight sum
//   3       sum of the products
//   4..15   pipe_div, 24 quotient bits, 2 per stage
//   16..27  pipe_sqrt, 12 root bits, 1 per stage
// The centre pixel, M_w and the early-exit flag travel alongside so that
// the switch receives them aligned with sigma. The formula follows the
// filter description; the formats and the stage split (chosen so that the
// fixed part of the filter is 30 cycles, which with 5 cycles per unit
// gives the published total pipeline length) are this design's choice.
// Only valid bits are reset.
module deviation_unit
  import aswm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  est_t   in_est,
  output logic   out_valid,
  output sigma_t out_sigma,   // 8.4
  output mean_t  out_mw,      // 8.8, passed through
  output pixel_t out_xc,      // centre pixel, passed through
  output logic   out_done     // early-exit flag, passed through
);

  localparam int unsigned SQ_W   = 24;              // (X - M_w)^2, 16.8
  localparam int unsigned PROD_W = WGT_W + SQ_W;    // 56
  localparam int unsigned NUM_W  = PROD_W + 4;      // 60
  localparam int unsigned SIDE_W = MEAN_W + PIX_W + 1;

  typedef struct packed {
    mean_t  mw;
    pixel_t xc;
    logic   done;
  } side_t;

  // ---- stage 1: squared deviations -----------------------------------------
  logic [SQ_W-1:0] s1_sq [WIN_N];
  weights_t        s1_w;
  side_t           s1_side;
  logic            s1_vld;

  always_ff @(posedge clk) begin
    for (int k = 0; k < int'(WIN_N); k++) begin
      logic [MEAN_W-1:0]   xs, d;
      logic [2*MEAN_W-1:0] sq;
      xs = {in_est.win[k], 8'h00};
      d  = (xs >= in_est.mw) ? xs - in_est.mw : in_est.mw - xs;
      sq = d * d;                          // 16.16
      s1_sq[k] <= SQ_W'(sq >> MEAN_FR);  // keep 16.8
    end
    s1_w    <= in_est.w;
    s1_side <= '{mw: in_est.mw, xc: in_est.win[4], done: in_est.done};
  end

  // ---- stage 2: products and weight sum ------------------------------------
  logic [PROD_W-1:0] s2_p [WIN_N];
  logic [WSUM_W-1:0] s2_den;
  side_t             s2_side;
  logic              s2_vld;

  always_ff @(posedge clk) begin
    logic [WSUM_W-1:0] dn;
    dn = '0;
    for (int k = 0; k < int'(WIN_N); k++) begin
      s2_p[k] <= PROD_W'(s1_w[k]) * PROD_W'(s1_sq[k]);
      dn = dn + WSUM_W'(s1_w[k]);
    end
    s2_den  <= dn;
    s2_side <= s1_side;
  end

  // ---- stage 3: sum of products --------------------------------------------
  logic [NUM_W-1:0]  s3_num;
  logic [WSUM_W-1:0] s3_den;
  side_t             s3_side;
  logic              s3_vld;

  always_ff @(posedge clk) begin
    logic [NUM_W-1:0] n;
    n = '0;
    for (int k = 0; k < int'(WIN_N); k++) n = n + NUM_W'(s2_p[k]);
    s3_num  <= n;
    s3_den  <= s2_den;
    s3_side <= s2_side;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_vld <= 1'b0;
      s2_vld <= 1'b0;
      s3_vld <= 1'b0;
    end else begin
      s1_vld <= in_valid;
      s2_vld <= s1_vld;
      s3_vld <= s2_vld;
    end
  end

  // ---- stages 4-15: weighted variance --------------------------------------
  logic            var_vld;
  logic [SQ_W-1:0] var_q;
  side_t           var_side;

  pipe_div #(
    .NUM_W (NUM_W),
    .DEN_W (WSUM_W),
    .Q_W   (SQ_W),
    .STAGES(12),
    .SIDE_W(SIDE_W)
  ) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s3_vld),
    .num      (s3_num),
    .den      (s3_den),
    .in_side  (s3_side),
    .out_valid(var_vld),
    .quo      (var_q),
    .out_side (var_side)
  );

  // ---- stages 16-27: square root -------------------------------------------
  side_t out_side;

  pipe_sqrt #(
    .R_W   (SQ_W),
    .STAGES(12),
    .SIDE_W(SIDE_W)
  ) u_sqrt (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (var_vld),
    .rad      (var_q),
    .in_side  (var_side),
    .out_valid(out_valid),
    .root     (out_sigma),
    .out_side (out_side)
  );

  assign out_mw   = out_side.mw;
  assign out_xc   = out_side.xc;
  assign out_done = out_side.done;

endmodule
