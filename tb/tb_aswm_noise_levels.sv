// tb_aswm_noise_levels: the filter at its default 25 estimation units on
// 64x40 frames at the impulse noise densities the filter was studied at.
//
// The image is generated procedurally: a smooth pattern (gradients and a
// checkerboard of soft edges) corrupted by salt-and-pepper impulse noise
// of 5, 15, 30, 45, 60 and 75 percent, from a hash of frame, row and column. Every
// output pixel is compared with the reference model applied to the same
// window, and its latency (1 cycle window forming + 30 + 5*N_UNITS) is
// checked. The mechanisms of the design are counted and each must occur:
// pixels replaced by the median, pixels kept, loops that met the early-exit
// test before the last unit (later units bypassed), gaps in the input
// stream, a change of alpha between frames, and, for chains shorter than 20
// units, loops that ran through every unit (the last unit's weights used).
module tb_aswm_noise_levels;
  import aswm_pkg::*;
  import aswm_ref_pkg::*;

  localparam int W = 64, H = 40, FRAMES = 6;
  localparam int N_UNITS = 25;
  localparam int LAT = 1 + 30 + 5 * N_UNITS;
  localparam longint unsigned EPS = 26;

  logic   clk = 0, rst_n = 1;
  logic   in_valid;
  pixel_t in_pix;
  alpha_t alpha;
  logic   out_valid, out_noisy, out_early;
  pixel_t out_pix;
  int checks = 0, failures = 0;
  int cycle = 0;
  int n_noisy = 0, n_kept = 0, n_bypass = 0, n_full = 0, n_gaps = 0, n_alpha = 0;
  int n_fixed = 0, n_out = 0;
  int f_max_iter [FRAMES], f_unconv [FRAMES], f_replaced [FRAMES];

  aswm_filter #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int hash(int f, int r, int c);
    int unsigned h = 32'h9e37_79b9 * (f + 1) ^ 32'h85eb_ca6b * (r + 7) ^ 32'hc2b2_ae35 * (c + 13);
    h ^= h >> 15; h *= 32'h2c1b_3c6d; h ^= h >> 12; h *= 32'h297a_2d39; h ^= h >> 15;
    return int'(h & 32'h7fff_ffff);
  endfunction

  // impulse noise density of frame f, in percent
  function automatic int frame_noise(int f);
    return (f == 0) ? 5 : (f == 1) ? 15 : (f == 2) ? 30 : (f == 3) ? 45 : (f == 4) ? 60 : 75;
  endfunction

  function automatic px_t img_px(int f, int r, int c);
    int v, hh;
    v = 40 + (r * 97) / H + (c * 113) / W + ((((r / 5) + (c / 7)) % 2 == 1) ? 50 : 0) + (hash(f, r, c) % 5);
    if (v > 255) v = 255;
    hh = hash(f + 100, r, c) % 1000;
    if (hh < frame_noise(f) * 5) return 8'd0;
    if (hh < frame_noise(f) * 10) return 8'd255;
    return px_t'(v);
  endfunction

  function automatic alpha_t frame_alpha(int f);
    return (f % 2 == 0) ? 8'h20 : 8'h30;     // 2.0, then 3.0
  endfunction

  typedef struct { int f, r, c, t; alpha_t a; } item_t;
  item_t q[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      win_t w;
      px_t y;
      bit nz, dn;
      int iters;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        it = q.pop_front();
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            w[3*(dr+1) + (dc+1)] = img_px(it.f, it.r + dr, it.c + dc);
        ref_pixel(w, N_UNITS, EPS, it.a, y, nz, dn, iters);
        checks++;
        n_out++;
        if (nz) n_noisy++; else n_kept++;
        if (dn && iters < N_UNITS) n_bypass++;
        if (iters == N_UNITS) n_full++;
        if (nz && w[4] != y) n_fixed++;
        if (iters > f_max_iter[it.f]) f_max_iter[it.f] = iters;
        if (!dn) f_unconv[it.f]++;
        if (nz) f_replaced[it.f]++;
        if (out_pix != y || out_noisy != nz || out_early != dn || cycle != it.t) begin
          failures++;
          if (failures < 10)
            $display("FAIL f%0d r%0d c%0d: pix %0d/%0d noisy %0d/%0d early %0d/%0d cycle %0d/%0d",
                     it.f, it.r, it.c, out_pix, y, out_noisy, nz, out_early, dn, cycle, it.t);
        end
      end
    end
  end

  initial begin
    in_valid = 0;
    in_pix = '0;
    alpha = frame_alpha(0);
    foreach (f_max_iter[f]) begin f_max_iter[f] = 0; f_unconv[f] = 0; f_replaced[f] = 0; end
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          @(negedge clk);
          // blanking: a gap at the end of each row, and random gaps
          if (c == 0 && r > 0 || $urandom_range(0, 15) == 0) begin
            in_valid = 0;
            n_gaps++;
            @(negedge clk);
          end
          in_valid = 1;
          in_pix = img_px(f, r, c);
          // sampled at the next rising edge, cycle + 1
          if (r >= 2 && c >= 2) q.push_back('{f, r-1, c-1, cycle + 1 + LAT, alpha});
        end
      @(negedge clk) in_valid = 0;
      repeat (LAT + 2) @(posedge clk);
      // alpha is changed only while the pipeline is empty
      @(negedge clk);
      if (f + 1 < FRAMES && alpha != frame_alpha(f + 1)) n_alpha++;
      alpha = frame_alpha(f + 1);
    end
    checks++;
    if (q.size() != 0 || n_out != FRAMES * (W-2) * (H-2)) begin
      failures++;
      $display("FAIL output count %0d", n_out);
    end
    $display("outputs=%0d replaced=%0d (changed=%0d) kept=%0d early_exit=%0d all_units=%0d gaps=%0d alpha_changes=%0d",
             n_out, n_noisy, n_fixed, n_kept, n_bypass, n_full, n_gaps, n_alpha);
    for (int f = 0; f < FRAMES; f++)
      $display("frame %0d: noise %0d%%, most units used %0d, not converged %0d, replaced %0d of %0d",
               f, frame_noise(f), f_max_iter[f], f_unconv[f], f_replaced[f], (W-2)*(H-2));
    checks++;
    if (n_noisy == 0 || n_kept == 0 || n_bypass == 0 || (N_UNITS < 20 && n_full == 0) || n_gaps == 0 || (FRAMES > 1 && n_alpha == 0)) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
