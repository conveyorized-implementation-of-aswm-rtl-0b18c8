// weight_est_unit: one iteration of the ASWM weight estimation loop,
// unrolled into a pipeline stage (one "evaluation unit" of the chain).
//
// From the incoming weighted mean M_w^{t-1} the unit computes new weights
// w_k = 1/(|X_k - M_w^{t-1}| + delta) for the nine window pixels, the new
// weighted mean M_w^t = sum(w_k X_k) / sum(w_k), and the early-exit test
// |M_w^t - M_w^{t-1}| < EPS. A multiplexer then forwards either the new
// state, or, when an earlier unit has already converged (done flag set),
// the incoming state untouched: the unit is bypassed and the loop has in
// effect ended. If no unit converges, the last unit's weights are used.
//
// The divisions of the weight step are table look-ups: the integer part of
// |X_k - M_w| (8 bits) addresses one 256 x 32-bit recip_rom per pixel. The
// mean division is a two-stage pipe_div producing M_w in 8.8.
//
// Pipeline, one window per clock, latency 5 cycles:
//   1  table addresses |X_k - M_w| (integer part)
//   2  table read
//   3  sums sum(w_k X_k) and sum(w_k)
//   4  quotient bits 15..8
//   5  quotient bits 7..0; convergence test and bypass multiplexer follow
//      combinationally on the registered results
// Structure (weight calculation, comparison, multiplexer, bypass signal),
// the 8-bit/32-bit table and the 5-cycle unit follow the filter's
// description; EPS, the fixed-point formats and the stage split are this
// design's choice. Only valid bits are reset.
module weight_est_unit
  import aswm_pkg::*;
#(
  parameter mean_t EPS = 16'd26   // convergence threshold, 8.8 (about 0.1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  est_t in_est,
  output logic out_valid,
  output est_t out_est
);

  localparam int unsigned NUM_W = WXSUM_W + MEAN_FR;
  localparam int unsigned SIDE_W = EST_W + $bits(weights_t);

  // ---- stage 1: table addresses -------------------------------------------
  est_t       s1_est;
  logic       s1_vld;
  logic [7:0] s1_addr [WIN_N];

  always_ff @(posedge clk) begin
    s1_est <= in_est;
    for (int k = 0; k < int'(WIN_N); k++) begin
      logic [MEAN_W-1:0] xs, d;
      xs = {in_est.win[k], 8'h00};
      d  = (xs >= in_est.mw) ? xs - in_est.mw : in_est.mw - xs;
      s1_addr[k] <= 8'(d >> MEAN_FR);
    end
  end

  // ---- stage 2: nine table reads -------------------------------------------
  est_t     s2_est;
  logic     s2_vld;
  weights_t s2_w;

  for (genvar k = 0; k < int'(WIN_N); k++) begin : g_rom
    recip_rom u_rom (.clk(clk), .addr(s1_addr[k]), .data(s2_w[k]));
  end

  always_ff @(posedge clk) s2_est <= s1_est;

  // ---- stage 3: weighted sums ----------------------------------------------
  est_t                s3_est;
  logic                s3_vld;
  weights_t            s3_w;
  logic [WXSUM_W-1:0]  s3_num;
  logic [WSUM_W-1:0]   s3_den;

  always_ff @(posedge clk) begin
    logic [WXSUM_W-1:0] n;
    logic [WSUM_W-1:0]  dn;
    n  = '0;
    dn = '0;
    for (int k = 0; k < int'(WIN_N); k++) begin
      n  = n + WXSUM_W'(s2_w[k]) * WXSUM_W'(s2_est.win[k]);
      dn = dn + WSUM_W'(s2_w[k]);
    end
    s3_num <= n;
    s3_den <= dn;
    s3_w   <= s2_w;
    s3_est <= s2_est;
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

  // ---- stages 4-5: new weighted mean ---------------------------------------
  logic              s5_vld;
  mean_t             s5_mw;
  logic [SIDE_W-1:0] s5_side;
  est_t              s5_est;
  weights_t          s5_w;

  pipe_div #(
    .NUM_W (NUM_W),
    .DEN_W (WSUM_W),
    .Q_W   (MEAN_W),
    .STAGES(2),
    .SIDE_W(SIDE_W)
  ) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s3_vld),
    .num      ({s3_num, 8'h00}),
    .den      (s3_den),
    .in_side  ({s3_est, s3_w}),
    .out_valid(s5_vld),
    .quo      (s5_mw),
    .out_side (s5_side)
  );

  assign {s5_est, s5_w} = s5_side;

  // ---- convergence test and bypass multiplexer -----------------------------
  logic [MEAN_W-1:0] step;
  logic              conv;

  assign step = (s5_mw >= s5_est.mw) ? s5_mw - s5_est.mw : s5_est.mw - s5_mw;
  assign conv = step < EPS;

  always_comb begin
    if (s5_est.done) begin
      out_est = s5_est;                  // bypass: loop already ended
    end else begin
      out_est.win  = s5_est.win;
      out_est.w    = s5_w;
      out_est.mw   = s5_mw;
      out_est.done = conv;
    end
  end

  assign out_valid = s5_vld;

  // The divider needs a non-zero divisor; every table word is positive.
  always_ff @(posedge clk) begin
    if (s3_vld) assert (s3_den != '0) else $error("weight_est_unit: zero weight sum");
  end

endmodule
