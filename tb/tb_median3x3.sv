// tb_median3x3: random windows (and windows with many equal values), median
// compared with a sorted copy, 3-cycle latency checked.
module tb_median3x3;
  import aswm_pkg::*;
  import aswm_ref_pkg::*;

  logic    clk = 0, rst_n = 1;
  logic    in_valid;
  window_t in_win;
  logic    out_valid;
  pixel_t  out_med;
  int checks = 0, failures = 0;
  int cycle = 0;

  median3x3 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { px_t m; int t; } item_t;
  item_t q[$];

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      win_t w;
      foreach (w[k]) w[k] = in_win[k];
      q.push_back('{ref_median(w), cycle});
    end
    if (rst_n && out_valid) begin
      item_t it;
      it = q.pop_front();
      checks++;
      if (out_med != it.m || cycle - it.t != 3) begin
        failures++;
        $display("FAIL med %0d expected %0d", out_med, it.m);
      end
    end
  end

  initial begin
    in_valid = 0;
    in_win = '0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      foreach (in_win[k]) in_win[k] = (n % 3 == 0) ? pixel_t'($urandom_range(0, 3) * 85) : pixel_t'($urandom);
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
