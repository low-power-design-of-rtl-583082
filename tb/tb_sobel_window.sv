// tb_sobel_window: streams two 8x6 frames with random gaps into the window
// generator and checks, after every accepted pixel, the window flag, the
// nine window pixels and the centre coordinates against the stored frame.
module tb_sobel_window;
  import sobel_pkg::*;

  localparam int W = 8, H = 6, FRAMES = 2;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    in_valid;
  pixel_t  in_pix;
  window_t win;
  logic    win_valid;
  logic [2:0] win_row;
  logic [2:0] win_col;
  int checks = 0, failures = 0, n_win = 0, n_gap = 0;
  int img [H][W];

  sobel_window #(.IMG_W(W), .IMG_H(H)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_pix(in_pix),
    .win(win), .win_valid(win_valid), .win_row(win_row), .win_col(win_col)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_pix = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int r = 0; r < H; r++) begin
        for (int c = 0; c < W; c++) begin
          while ($urandom_range(0, 3) == 0) begin
            in_valid = 1'b0;
            n_gap++;
            @(posedge clk); #1;
            checks++;
            if (win_valid) begin failures++; $display("FAIL window flagged in a gap"); end
          end
          img[r][c] = int'($urandom_range(0, 255));
          in_valid = 1'b1;
          in_pix   = 8'(img[r][c]);
          @(posedge clk); #1;
          in_valid = 1'b0;
          checks++;
          if (win_valid != (r >= 2 && c >= 2)) begin
            failures++;
            $display("FAIL flag at (%0d,%0d): %b", r, c, win_valid);
          end
          if (r >= 2 && c >= 2) begin
            n_win++;
            checks++;
            if (int'(win_row) != r - 1 || int'(win_col) != c - 1) begin
              failures++;
              $display("FAIL centre (%0d,%0d) for (%0d,%0d)", win_row, win_col, r - 1, c - 1);
            end
            for (int i = 0; i < 3; i++) begin
              for (int j = 0; j < 3; j++) begin
                checks++;
                if (int'(win[i][j]) != img[r-2+i][c-2+j]) begin
                  failures++;
                  $display("FAIL win[%0d][%0d]=%0d at (%0d,%0d), expected %0d",
                           i, j, win[i][j], r, c, img[r-2+i][c-2+j]);
                end
              end
            end
          end
        end
      end
    end
    checks++;
    if (n_win != FRAMES * (W - 2) * (H - 2) || n_gap == 0) begin
      failures++;
      $display("FAIL %0d windows, %0d gaps", n_win, n_gap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
