// tb_aswm_chain_length: the same noisy frames through four filters that
// differ only in their number of weight estimation units (5, 10, 20 and
// 40), at impulse noise densities of 5, 15, 30, 45, 60 and 75 percent.
// Every output pixel of every filter is checked against the reference
// model with the same chain length, and its latency (1 + 30 + 5*N cycles).
// For each filter and frame the PSNR of the output against the clean image
// is reported next to that of the noisy input; a filter whose output is
// not cleaner than its input counts as a failure. The clean image is a
// smooth pattern of gradients and soft-edged blocks; the noise is
// salt-and-pepper from a hash of frame, row and column.
module tb_aswm_chain_length;
  import aswm_pkg::*;
  import aswm_ref_pkg::*;

  localparam int W = 48, H = 32, FRAMES = 6, NF = 4;
  localparam int UNITS [NF] = '{5, 10, 20, 40};
  localparam longint unsigned EPS = 26;
  localparam int LAT_MAX = 1 + 30 + 5 * 40;

  logic   clk = 0, rst_n = 1;
  logic   in_valid;
  pixel_t in_pix;
  alpha_t alpha;
  logic   out_valid [NF];
  logic   out_noisy [NF];
  logic   out_early [NF];
  pixel_t out_pix   [NF];
  int checks = 0, failures = 0;
  int cycle = 0;

  for (genvar i = 0; i < NF; i++) begin : g_dut
    aswm_filter #(.IMG_W(W), .IMG_H(H), .N_UNITS(UNITS[i])) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_pix(in_pix), .alpha(alpha),
      .out_valid(out_valid[i]), .out_pix(out_pix[i]), .out_noisy(out_noisy[i]),
      .out_early(out_early[i])
    );
  end

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  function automatic int frame_noise(int f);
    return (f == 0) ? 5 : (f == 1) ? 15 : (f == 2) ? 30 : (f == 3) ? 45 : (f == 4) ? 60 : 75;
  endfunction

  function automatic px_t clean_px(int r, int c);
    int v;
    v = 40 + (r * 97) / H + (c * 113) / W + ((((r / 5) + (c / 7)) % 2 == 1) ? 50 : 0);
    return px_t'(v > 255 ? 255 : v);
  endfunction

  function automatic px_t img_px(int f, int r, int c);
    int hh;
    hh = hash(f + 100, r, c) % 1000;
    if (hh < frame_noise(f) * 5) return 8'd0;
    if (hh < frame_noise(f) * 10) return 8'd255;
    return clean_px(r, c);
  endfunction

  function automatic real psnr(real sse, int n);
    if (sse == 0.0) return 99.0;
    return 10.0 * $log10(255.0 * 255.0 / (sse / n));
  endfunction

  typedef struct { int f, r, c, t; } item_t;
  item_t q [NF][$];
  real sse_out [NF][FRAMES];
  real sse_in [FRAMES];
  int  n_pix [FRAMES];

  for (genvar i = 0; i < NF; i++) begin : g_chk
    always @(posedge clk) begin
      if (rst_n && out_valid[i]) begin
        item_t it;
        win_t w;
        px_t y;
        bit nz, dn;
        int iters;
        real e;
        if (q[i].size() == 0) begin
          failures++;
          $display("FAIL unexpected output, %0d units", UNITS[i]);
        end else begin
          it = q[i].pop_front();
          for (int dr = -1; dr <= 1; dr++)
            for (int dc = -1; dc <= 1; dc++)
              w[3*(dr+1) + (dc+1)] = img_px(it.f, it.r + dr, it.c + dc);
          ref_pixel(w, UNITS[i], EPS, alpha, y, nz, dn, iters);
          checks++;
          if (out_pix[i] != y || out_noisy[i] != nz || out_early[i] != dn
              || cycle != it.t + 5 * UNITS[i]) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d units f%0d r%0d c%0d: pix %0d/%0d", UNITS[i], it.f, it.r, it.c, out_pix[i], y);
          end
          e = real'(int'(out_pix[i]) - int'(clean_px(it.r, it.c)));
          sse_out[i][it.f] += e * e;
        end
      end
    end
  end

  initial begin
    in_valid = 0;
    in_pix = '0;
    alpha = 8'h20;     // 2.0
    foreach (sse_in[f]) begin
      sse_in[f] = 0.0;
      n_pix[f] = 0;
      for (int i = 0; i < NF; i++) sse_out[i][f] = 0.0;
    end
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int f = 0; f < FRAMES; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          @(negedge clk);
          in_valid = 1;
          in_pix = img_px(f, r, c);
          if (r >= 2 && c >= 2) begin
            real e;
            e = real'(int'(img_px(f, r-1, c-1)) - int'(clean_px(r-1, c-1)));
            sse_in[f] += e * e;
            n_pix[f]++;
            // sampled at the next rising edge; + 5*N added per filter
            for (int i = 0; i < NF; i++) q[i].push_back('{f, r-1, c-1, cycle + 1 + 1 + 30});
          end
        end
    @(negedge clk) in_valid = 0;
    repeat (LAT_MAX + 2) @(posedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      $write("noise %2d%%: input PSNR %5.2f dB, output PSNR", frame_noise(f), psnr(sse_in[f], n_pix[f]));
      for (int i = 0; i < NF; i++) begin
        $write("  %0d units %5.2f", UNITS[i], psnr(sse_out[i][f], n_pix[f]));
        checks++;
        if (psnr(sse_out[i][f], n_pix[f]) <= psnr(sse_in[f], n_pix[f])) failures++;
      end
      $write(" dB\n");
    end
    for (int i = 0; i < NF; i++) begin
      checks++;
      if (q[i].size() != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
