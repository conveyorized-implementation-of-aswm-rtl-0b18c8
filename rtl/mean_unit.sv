// mean_unit: initial weighted mean of the ASWM loop (all weights 1.0).
//
// With every weight equal, M_w of eq. (1) is the plain window mean, so the
// unit adds the nine pixels and divides by nine. The result is M_w in 8.8
// fixed point, floor(256 * sum / 9). The unit also starts the state that
// the chain of weight estimation units carries: the window, weights set to
// 1.0 (WEIGHT_ONE) and the early-exit flag cleared.
//
// Timing: fully pipelined, one window per clock, latency 2 cycles
// (cycle 1: sum, cycle 2: division by the constant 9). Only valid is reset.
// The function follows the filter's description; the two-stage split and
// the number format are this design's choice.
module mean_unit
  import aswm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  window_t in_win,
  output logic    out_valid,
  output est_t    out_est
);

  logic [11:0] sum_q;
  window_t     win_q;
  logic        vld_q;
  logic [11:0] sum_d;

  always_comb begin : p_sum
    logic [11:0] s;
    s = '0;
    for (int k = 0; k < int'(WIN_N); k++) s = s + 12'(in_win[k]);
    sum_d = s;
  end

  always_ff @(posedge clk) begin
    sum_q <= sum_d;
    win_q <= in_win;
    out_est.win  <= win_q;
    out_est.mw   <= mean_t'(({sum_q, 8'h00}) / 20'd9);
    out_est.done <= 1'b0;
    for (int k = 0; k < int'(WIN_N); k++) out_est.w[k] <= WEIGHT_ONE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q     <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      vld_q     <= in_valid;
      out_valid <= vld_q;
    end
  end

endmodule
