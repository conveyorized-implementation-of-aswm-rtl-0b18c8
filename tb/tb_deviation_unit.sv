// tb_deviation_unit: random windows with weights taken from the weight
// table (as a real chain produces them) and random means; checks sigma
// against the reference sqrt(sum(w (X-M_w)^2)/sum(w)), the pass-through
// of centre pixel, mean and done flag, and the 27-cycle latency.
module tb_deviation_unit;
  import aswm_pkg::*;
  import aswm_ref_pkg::*;

  logic   clk = 0, rst_n = 1;
  logic   in_valid, out_valid, out_done;
  est_t   in_est;
  sigma_t out_sigma;
  mean_t  out_mw;
  pixel_t out_xc;
  int checks = 0, failures = 0;
  int cycle = 0;

  deviation_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { u64 s; mean_t mw; pixel_t xc; bit d; int t; } item_t;
  item_t q[$];

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      win_t w; wts_t wt;
      foreach (w[k]) begin w[k] = in_est.win[k]; wt[k] = in_est.w[k]; end
      q.push_back('{ref_sigma(w, wt, in_est.mw), in_est.mw, in_est.win[4], in_est.done, cycle});
    end
    if (rst_n && out_valid) begin
      item_t it;
      it = q.pop_front();
      checks++;
      if (64'(out_sigma) != it.s || out_mw != it.mw || out_xc != it.xc || out_done != it.d
          || cycle - it.t != 27) begin
        failures++;
        $display("FAIL sigma %0d expected %0d latency %0d", out_sigma, it.s, cycle - it.t);
      end
    end
  end

  initial begin
    in_valid = 0;
    in_est = '0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 5) != 0);
      foreach (in_est.win[k]) in_est.win[k] = pixel_t'($urandom);
      foreach (in_est.w[k]) in_est.w[k] = ref_weight($urandom_range(0, 255));
      if (n % 4 == 0) foreach (in_est.w[k]) in_est.w[k] = 32'h8000_0000;   // largest weights
      in_est.mw = (n % 4 == 1) ? 16'd0 : mean_t'($urandom);
      in_est.done = $urandom_range(0, 1) == 1;
    end
    @(negedge clk) in_valid = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
