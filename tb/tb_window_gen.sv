// tb_window_gen: sends three random 9x6 frames with random gaps in the
// pixel stream and checks that exactly the interior windows appear, in
// raster order, each one clock after the pixel that completes it, with
// every element taken from the right row and column.
module tb_window_gen;
  import aswm_pkg::*;

  localparam int W = 9, H = 6, FRAMES = 3;

  logic    clk = 0, rst_n = 1;
  logic    in_valid;
  pixel_t  in_pix;
  logic    out_valid;
  window_t out_win;
  int checks = 0, failures = 0;
  int cycle = 0;

  window_gen #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned img [FRAMES][H][W];
  typedef struct { int f, r, c, t; } item_t;
  item_t q[$];
  int n_out = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      bit ok;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected window");
      end else begin
        it = q.pop_front();
        ok = (cycle - it.t == 1);
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            ok &= out_win[3*(dr+1) + (dc+1)] == img[it.f][it.r+dr][it.c+dc];
        checks++;
        n_out++;
        if (!ok) begin
          failures++;
          $display("FAIL window f%0d r%0d c%0d", it.f, it.r, it.c);
        end
      end
    end
  end

  initial begin
    in_valid = 0;
    in_pix = '0;
    foreach (img[f, r, c]) img[f][r][c] = byte'($urandom);
    #1 rst_n = 0;
    #20 rst_n = 1;
    for (int f = 0; f < FRAMES; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          @(negedge clk);
          while ($urandom_range(0, 3) == 0) begin
            in_valid = 0;
            @(negedge clk);
          end
          in_valid = 1;
          in_pix = img[f][r][c];
          if (r >= 2 && c >= 2) q.push_back('{f, r-1, c-1, cycle + 1});
        end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_out != FRAMES * (W-2) * (H-2)) begin
      failures++;
      $display("FAIL count %0d", n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
