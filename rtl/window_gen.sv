// window_gen: forms the 3x3 filter window X_{i+k,j+l} from a raster stream.
//
// Pixels arrive one per valid clock, row by row, IMG_W per row and IMG_H
// rows per frame. Two line buffers (IMG_W bytes each) hold the two previous
// rows; with the incoming pixel they give a new window column, which is
// shifted into a 3x3 register window. A window is produced only when it
// lies wholly inside the image, so a frame yields (IMG_W-2) x (IMG_H-2)
// windows, centred on the interior pixels; border pixels are not filtered.
// The row and column counters start at zero after reset and wrap at the
// frame size, so frames must be sent whole.
//
// Timing: the window centred on pixel (r-1, c-1) leaves one clock after
// pixel (r, c) enters. No backpressure: the downstream pipeline accepts a
// window every clock. Gaps in in_valid (blanking) are allowed.
// The filter description defines the window and the one-pixel-per-clock
// rate but not how the window is formed; this line-buffer scheme and the
// border handling are this design's choice.
module window_gen
  import aswm_pkg::*;
#(
  parameter int unsigned IMG_W = 1920,
  parameter int unsigned IMG_H = 1080
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  pixel_t  in_pix,
  output logic    out_valid,
  output window_t out_win
);

  localparam int unsigned CW = $clog2(IMG_W);
  localparam int unsigned RW = $clog2(IMG_H);

  pixel_t line1 [IMG_W];   // previous row
  pixel_t line2 [IMG_W];   // row before that
  logic [CW-1:0] col_q;
  logic [RW-1:0] row_q;
  pixel_t tap1, tap2;

  assign tap1 = line1[col_q];
  assign tap2 = line2[col_q];

  always_ff @(posedge clk) begin
    if (in_valid) begin
      line1[col_q] <= in_pix;
      line2[col_q] <= tap1;
      for (int r = 0; r < 3; r++) begin
        out_win[3*r]   <= out_win[3*r+1];
        out_win[3*r+1] <= out_win[3*r+2];
      end
      out_win[2] <= tap2;
      out_win[5] <= tap1;
      out_win[8] <= in_pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q     <= '0;
      row_q     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (row_q >= RW'(2)) && (col_q >= CW'(2));
      if (in_valid) begin
        if (col_q == CW'(IMG_W - 1)) begin
          col_q <= '0;
          row_q <= (row_q == RW'(IMG_H - 1)) ? '0 : row_q + 1'b1;
        end else begin
          col_q <= col_q + 1'b1;
        end
      end
    end
  end

endmodule
