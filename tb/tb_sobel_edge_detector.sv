// tb_sobel_edge_detector: end-to-end test of the streaming edge detector on
// two 16x12 frames (reduced image size). The frames mix dark areas (pixels
// that fit the low multiplier segment), bright bars, a diagonal edge and
// noise. The pixel source inserts random idle cycles. Every edge pixel is
// checked against the reference model (value, centre coordinates, order and
// 11-cycle latency after the accept of the pixel that completed its
// window), and the test counts how often each mechanism occurred: input
// back-pressure, idle input, border pixels, high- and low-segment products,
// magnitude saturation and the frame wrap. The segmentation correction is
// counted but not required: Sobel coefficients (|c| <= 2) never set the MSB
// of the 4-bit low segment, so the correction term is zero throughout the
// edge detector; it is exercised by the multiplier's own testbench. Nor do
// the approximate compressors act at the default APPROX_COLS (the low
// columns of the 4x4 core never hold four partial products); they act in
// tb_sobel_variants, which widens the approximated region.
module tb_sobel_edge_detector;
  import sobel_pkg::*;
  import ssm_ref_pkg::*;

  localparam int W = 16, H = 12, FRAMES = 2;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       pix_valid, pix_ready;
  pixel_t     pix_data;
  logic       edge_valid;
  pixel_t     edge_data;
  logic [3:0] edge_row;
  logic [3:0] edge_col;

  sobel_edge_detector #(.IMG_W(W), .IMG_H(H)) dut (
    .clk(clk), .rst_n(rst_n),
    .pix_valid(pix_valid), .pix_ready(pix_ready), .pix_data(pix_data),
    .edge_valid(edge_valid), .edge_data(edge_data),
    .edge_row(edge_row), .edge_col(edge_col)
  );

  always #5 clk = ~clk;

  typedef struct { int row; int col; int mag; int exact; longint due; } exp_t;
  exp_t   expq [$];
  int     img [H][W];
  longint cycle = 0;
  int checks = 0, failures = 0, n_out = 0;
  int n_bp = 0, n_idle = 0, n_border = 0, n_hi = 0, n_lo = 0, n_corr = 0, n_sat = 0, n_wrap = 0;
  int f_cur = 0;
  longint err_sum = 0;

  function automatic int gen_pix(int f, int r, int c);
    int v;
    if (c < 4)                  v = int'($urandom_range(0, 15));        // dark
    else if (c < 7)             v = 200 + int'($urandom_range(0, 40));  // bright bar
    else if (r + c < 16 + f)    v = 30 + int'($urandom_range(0, 10));   // diagonal edge
    else                        v = int'($urandom_range(0, 255));       // noise
    return v;
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters, sampled on the clock
  always @(posedge clk) if (rst_n) begin
    if (pix_valid && !pix_ready) n_bp++;
    if (!pix_valid) n_idle++;
    if (dut.u_engine.mac_en) begin
      if (dut.u_engine.sel_x == 2'b10 || dut.u_engine.sel_y == 2'b10) n_hi++;
      if (dut.u_engine.sel_x == 2'b00 && dut.u_engine.tap_pix != 0 && dut.u_engine.cx != 0) n_lo++;
      if (dut.u_engine.u_mac_x.u_mult.corr != 0 || dut.u_engine.u_mac_y.u_mult.corr != 0) n_corr++;
    end
    if (edge_valid && dut.u_engine.saturated) n_sat++;
  end

  // output checker
  always @(posedge clk) if (rst_n && edge_valid) begin
    exp_t e;
    n_out++;
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("FAIL unexpected edge pixel at (%0d,%0d)", edge_row, edge_col);
    end else begin
      e = expq.pop_front();
      if (int'(edge_row) != e.row || int'(edge_col) != e.col || int'(edge_data) != e.mag ||
          cycle != e.due) begin
        failures++;
        $display("FAIL (%0d,%0d)=%0d at cycle %0d, expected (%0d,%0d)=%0d at %0d",
                 edge_row, edge_col, edge_data, cycle, e.row, e.col, e.mag, e.due);
      end
      err_sum += longint'((e.mag > e.exact) ? e.mag - e.exact : e.exact - e.mag);
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; pix_valid = 1'b0; pix_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int r = 0; r < H; r++) begin
        for (int c = 0; c < W; c++) begin
          img[r][c] = gen_pix(f, r, c);
          while ($urandom_range(0, 4) == 0) begin
            pix_valid = 1'b0;
            @(posedge clk); #1;
          end
          pix_valid = 1'b1;
          pix_data  = 8'(img[r][c]);
          while (!pix_ready) begin @(posedge clk); #1; end
          // accepted at the coming edge
          if (r >= 2 && c >= 2) begin
            exp_t e;
            int p [9];
            int gx, gy;
            for (int t = 0; t < 9; t++) p[t] = img[r - 2 + t / 3][c - 2 + t % 3];
            sobel_ref(p, gx, gy, e.mag);
            e.exact = sobel_exact(p);
            e.row = r - 1;
            e.col = c - 1;
            e.due = cycle + 11;
            expq.push_back(e);
            if (f > 0) n_wrap++;
          end else begin
            n_border++;
          end
          @(posedge clk); #1;
          pix_valid = 1'b0;
        end
      end
    end
    repeat (20) @(posedge clk);
    checks++;
    if (n_out != FRAMES * (W - 2) * (H - 2) || expq.size() != 0) begin
      failures++;
      $display("FAIL %0d edge pixels, %0d missing", n_out, expq.size());
    end
    $display("back-pressure %0d, idle %0d, border %0d, high-segment %0d, low-segment %0d, correction %0d, saturated %0d, second frame %0d",
             n_bp, n_idle, n_border, n_hi, n_lo, n_corr, n_sat, n_wrap);
    $display("mean |approximate - exact| edge value: %0.2f", real'(err_sum) / real'(n_out));
    checks++;
    if (n_bp == 0 || n_idle == 0 || n_border == 0 || n_hi == 0 || n_lo == 0 ||
        n_sat == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
