// sobel_window: 3x3 sliding window over a raster-order pixel stream.
//
// Two line buffers (IMG_W pixels each, written as memory arrays) hold the
// two previous image lines. For every accepted pixel at (row, col) the
// pixels of column col from the two previous lines are read, the line
// buffers are advanced (line 1 -> line 2, new pixel -> line 1) and the three
// pixels are shifted into the right-hand column of the window register.
// After that shift the window covers rows row-2..row and cols col-2..col, so
// its centre is (row-1, col-1). win_valid pulses for one cycle, the cycle
// after the accept, when row >= 2 and col >= 2, i.e. when all nine pixels
// belong to the current frame; border pixels produce no window. Row and
// column counters wrap at the end of a line and of a frame.
//
// The window stays unchanged until the next accepted pixel, which is how
// the consumer can read it over several cycles. Reset: synchronous, active
// low; clears the counters and win_valid (line buffer contents need no
// reset, since no window is flagged before they have been filled).
// Line buffers and window are the usual way to stream a 3x3 mask; the
// document gives the mask and the image size, the structure is this
// design's own.
module sobel_window
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256,
  parameter int unsigned CW    = $clog2(IMG_W),
  parameter int unsigned RW    = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,   // pixel accepted this cycle
  input  pixel_t        in_pix,
  output window_t       win,        // win[row][col], row 0 oldest line
  output logic          win_valid,
  output logic [RW-1:0] win_row,    // centre of the window
  output logic [CW-1:0] win_col
);

  initial begin
    assert (IMG_W >= 3 && IMG_H >= 3) else $error("sobel_window: image too small");
  end

  pixel_t lb1 [IMG_W];   // previous line
  pixel_t lb2 [IMG_W];   // line before that

  logic [CW-1:0] col;
  logic [RW-1:0] row;
  pixel_t        up1, up2;

  assign up1 = lb1[col];
  assign up2 = lb2[col];

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb2[col] <= up1;
      lb1[col] <= in_pix;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= up2;
      win[1][2] <= up1;
      win[2][2] <= in_pix;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      win_valid <= 1'b0;
      win_row   <= '0;
      win_col   <= '0;
    end else begin
      win_valid <= in_valid && (row >= RW'(2)) && (col >= CW'(2));
      if (in_valid) begin
        win_row <= row - RW'(1);
        win_col <= col - CW'(1);
        if (col == CW'(IMG_W - 1)) begin
          col <= '0;
          row <= (row == RW'(IMG_H - 1)) ? '0 : row + RW'(1);
        end else begin
          col <= col + CW'(1);
        end
      end
    end
  end

endmodule
