// tb_noise_switch: random centre pixels, means, deviations, medians and
// thresholds; checks the replace/keep decision of |X - M_w| > alpha*sigma,
// the output pixel and the 1-cycle latency. Counts both outcomes.
module tb_noise_switch;
  import aswm_pkg::*;
  import aswm_ref_pkg::*;

  logic   clk = 0, rst_n = 1;
  logic   in_valid;
  pixel_t in_xc, in_med;
  mean_t  in_mw;
  sigma_t in_sigma;
  alpha_t alpha;
  logic   out_valid, out_noisy;
  pixel_t out_pix;
  int checks = 0, failures = 0, n_noisy = 0, n_kept = 0;
  int cycle = 0;

  noise_switch dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { px_t y; bit n; int t; } item_t;
  item_t q[$];

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      bit nz;
      nz = ref_noisy(in_xc, in_mw, in_sigma, alpha);
      q.push_back('{nz ? in_med : in_xc, nz, cycle});
    end
    if (rst_n && out_valid) begin
      item_t it;
      it = q.pop_front();
      checks++;
      if (it.n) n_noisy++; else n_kept++;
      if (out_pix != it.y || out_noisy != it.n || cycle - it.t != 1) begin
        failures++;
        $display("FAIL pix %0d/%0d noisy %0d/%0d", out_pix, it.y, out_noisy, it.n);
      end
    end
  end

  initial begin
    in_valid = 0;
    {in_xc, in_med, in_mw, in_sigma, alpha} = '0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      in_xc    = pixel_t'($urandom);
      in_med   = pixel_t'($urandom);
      in_mw    = mean_t'($urandom);
      in_sigma = sigma_t'($urandom_range(0, 400));
      alpha    = alpha_t'($urandom_range(8, 64));
      if (n % 5 == 0) begin            // exact-boundary cases: |X-M_w| == alpha*sigma
        in_sigma = 12'd160;            // 10.0
        alpha    = 8'h20;              // 2.0
        in_mw    = mean_t'({in_xc, 8'h00}) + 16'd5120 * (n % 2); // X or X+20
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_noisy == 0 || n_kept == 0) failures++;
    $display("noisy=%0d kept=%0d", n_noisy, n_kept);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
