// tb_mean_unit: streams random windows (one per clock, with random gaps)
// and checks the initial mean floor(256*sum/9), the 1.0 weights, the
// cleared done flag and the 2-cycle latency.
module tb_mean_unit;
  import aswm_pkg::*;
  import aswm_ref_pkg::*;

  logic    clk = 0, rst_n = 1;
  logic    in_valid;
  window_t in_win;
  logic    out_valid;
  est_t    out_est;
  int checks = 0, failures = 0;
  int cycle = 0;

  mean_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { win_t w; int t; } item_t;
  item_t q[$];

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      item_t it;
      foreach (it.w[k]) it.w[k] = in_win[k];
      it.t = cycle;
      q.push_back(it);
    end
    if (rst_n && out_valid) begin
      item_t it;
      bit ok;
      it = q.pop_front();
      ok = (64'(out_est.mw) == ref_mean0(it.w)) && !out_est.done && (cycle - it.t == 2);
      foreach (it.w[k]) ok &= (out_est.win[k] == it.w[k]) && (out_est.w[k] == 32'h1000_0000);
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL mw %0d expected %0d latency %0d", out_est.mw, ref_mean0(it.w), cycle - it.t);
      end
    end
  end

  initial begin
    in_valid = 0;
    in_win = '0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      foreach (in_win[k]) in_win[k] = (n < 4) ? pixel_t'(n == 0 ? 0 : 255) : pixel_t'($urandom);
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
