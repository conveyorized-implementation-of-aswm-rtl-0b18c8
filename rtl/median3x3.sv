// median3x3: median m_ij of the nine pixels of a 3x3 window.
//
// Exact median by the row-sort method: sort each row (stage 1); take the
// largest of the row minima, the median of the row medians and the smallest
// of the row maxima (stage 2); the median of those three is the median of
// all nine (stage 3). This is the value the ASWM switch substitutes for a
// pixel found noisy; the network itself is this design's choice.
//
// Timing: one window per clock, latency 3 cycles. Only valid is reset.
module median3x3
  import aswm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  window_t in_win,
  output logic    out_valid,
  output pixel_t  out_med
);

  function automatic pixel_t max2(input pixel_t a, input pixel_t b);
    return (a > b) ? a : b;
  endfunction

  function automatic pixel_t min2(input pixel_t a, input pixel_t b);
    return (a < b) ? a : b;
  endfunction

  function automatic pixel_t med3(input pixel_t a, input pixel_t b, input pixel_t c);
    return max2(min2(a, b), min2(max2(a, b), c));
  endfunction

  pixel_t lo_q [3], mid_q [3], hi_q [3];
  pixel_t maxlo_q, medmid_q, minhi_q;
  logic   vld1_q, vld2_q;

  always_ff @(posedge clk) begin
    for (int r = 0; r < 3; r++) begin
      lo_q[r]  <= min2(min2(in_win[3*r], in_win[3*r+1]), in_win[3*r+2]);
      hi_q[r]  <= max2(max2(in_win[3*r], in_win[3*r+1]), in_win[3*r+2]);
      mid_q[r] <= med3(in_win[3*r], in_win[3*r+1], in_win[3*r+2]);
    end
    maxlo_q  <= max2(max2(lo_q[0], lo_q[1]), lo_q[2]);
    medmid_q <= med3(mid_q[0], mid_q[1], mid_q[2]);
    minhi_q  <= min2(min2(hi_q[0], hi_q[1]), hi_q[2]);
    out_med  <= med3(maxlo_q, medmid_q, minhi_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld1_q    <= 1'b0;
      vld2_q    <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      vld1_q    <= in_valid;
      vld2_q    <= vld1_q;
      out_valid <= vld2_q;
    end
  end

endmodule
