// tb_weight_est_unit: drives one weight estimation unit with random
// windows, means and done flags and checks, against the reference model,
// the new weights, the new mean, the convergence flag, the bypass of an
// already-converged state and the 5-cycle latency. Windows with a few
// impulse values among similar pixels make the unit both converge and not.
module tb_weight_est_unit;
  import aswm_pkg::*;
  import aswm_ref_pkg::*;

  localparam mean_t EPS = 16'd26;

  logic clk = 0, rst_n = 1;
  logic in_valid, out_valid;
  est_t in_est, out_est;
  int checks = 0, failures = 0;
  int n_conv = 0, n_noconv = 0, n_bypass = 0;
  int cycle = 0;

  weight_est_unit #(.EPS(EPS)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { est_t e; int t; } item_t;
  item_t q[$];

  function automatic est_t expected(est_t e);
    win_t w;
    wts_t wn;
    u64 mwn, step;
    est_t r;
    if (e.done) return e;
    foreach (w[k]) w[k] = e.win[k];
    ref_iter(w, e.mw, wn, mwn);
    step = (mwn >= e.mw) ? mwn - e.mw : e.mw - mwn;
    r.win = e.win;
    foreach (wn[k]) r.w[k] = weight_t'(wn[k]);
    r.mw = mean_t'(mwn);
    r.done = step < EPS;
    return r;
  endfunction

  always @(posedge clk) begin
    if (rst_n && in_valid) q.push_back('{expected(in_est), cycle});
    if (rst_n && out_valid) begin
      item_t it;
      it = q.pop_front();
      checks++;
      if (out_est != it.e || cycle - it.t != 5) begin
        failures++;
        $display("FAIL mw %0d expected %0d done %0d/%0d", out_est.mw, it.e.mw, out_est.done, it.e.done);
      end
    end
  end

  initial begin
    win_t w;
    in_valid = 0;
    in_est = '0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 5) != 0);
      begin
        int base = $urandom_range(20, 235);
        foreach (in_est.win[k]) begin
          case ($urandom_range(0, 5))
            0: in_est.win[k] = 8'd0;
            1: in_est.win[k] = 8'd255;
            default: in_est.win[k] = pixel_t'(base + $urandom_range(0, 20) - 10);
          endcase
          w[k] = in_est.win[k];
        end
      end
      foreach (in_est.w[k]) in_est.w[k] = weight_t'($urandom);
      // previous mean: the initial mean, a random value, or a chained step
      case (n % 3)
        0: in_est.mw = mean_t'(ref_mean0(w));
        1: in_est.mw = mean_t'($urandom);
        default: begin
          wts_t wn; u64 m;
          ref_iter(w, ref_mean0(w), wn, m);
          in_est.mw = mean_t'(m);
        end
      endcase
      in_est.done = ($urandom_range(0, 4) == 0);
      if (in_valid) begin
        if (in_est.done) n_bypass++;
        else if (expected(in_est).done) n_conv++;
        else n_noconv++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_conv == 0 || n_noconv == 0 || n_bypass == 0) failures++;
    $display("converged=%0d not_converged=%0d bypassed=%0d", n_conv, n_noconv, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
