// tb_sobel_variants: runs the same 24x16 test frame through three edge
// detectors that differ only in the approximate compressor used inside
// their multipliers (VARIANT 1, 2, 3), checks each output pixel against the
// reference model of that variant, and reports each variant's mean distance
// to an exact Sobel. The detectors approximate the lower 4 columns of their
// 4x4 core (APPROX_COLS = 4) instead of the default 2: at the default the
// approximated columns hold fewer than four partial products and no
// compressor is ever used, so the variants would be indistinguishable. The frame has a dark band, a bright band of width 5 and
// a noisy area, so that the compressors in the low columns see dense
// partial products.
module tb_sobel_variants;
  import sobel_pkg::*;
  import ssm_ref_pkg::*;

  localparam int W = 24, H = 16;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       pix_valid;
  pixel_t     pix_data;
  logic [3:1] ready, evalid;
  pixel_t     edata [1:3];
  logic [3:0] erow [1:3];
  logic [4:0] ecol [1:3];
  int img [H][W];
  int checks = 0, failures = 0;
  int n_out [1:3] = '{0, 0, 0};
  longint err [1:3] = '{0, 0, 0};
  int n_diff = 0;

  for (genvar v = 1; v <= 3; v++) begin : g_dut
    sobel_edge_detector #(.IMG_W(W), .IMG_H(H), .APPROX_COLS(4), .VARIANT(v)) dut (
      .clk(clk), .rst_n(rst_n),
      .pix_valid(pix_valid), .pix_ready(ready[v]), .pix_data(pix_data),
      .edge_valid(evalid[v]), .edge_data(edata[v]),
      .edge_row(erow[v]), .edge_col(ecol[v])
    );
  end

  always #5 clk = ~clk;

  // all three run in lock step, so outputs appear together
  always @(posedge clk) if (rst_n && evalid != 3'b000) begin
    int p [9];
    int gx, gy, mag, r, c;
    checks++;
    if (evalid != 3'b111) begin failures++; $display("FAIL outputs out of step: %b", evalid); end
    r = int'(erow[1]);
    c = int'(ecol[1]);
    for (int t = 0; t < 9; t++) p[t] = img[r - 1 + t / 3][c - 1 + t % 3];
    if (edata[1] != edata[2] || edata[1] != edata[3]) n_diff++;
    for (int v = 1; v <= 3; v++) begin
      int ex;
      sobel_ref(p, gx, gy, mag, v, 4);
      ex = sobel_exact(p);
      n_out[v]++;
      err[v] += longint'((mag > ex) ? mag - ex : ex - mag);
      checks++;
      if (int'(edata[v]) != mag || erow[v] != erow[1] || ecol[v] != ecol[1]) begin
        failures++;
        if (failures < 10) $display("FAIL variant %0d (%0d,%0d) = %0d, expected %0d", v, r, c, edata[v], mag);
      end
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
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c < W; c++) begin
        if (c < 6)       img[r][c] = int'($urandom_range(0, 15));
        else if (c < 11) img[r][c] = 200 + int'($urandom_range(0, 55));
        else             img[r][c] = int'($urandom_range(0, 255));
        pix_valid = 1'b1;
        pix_data  = 8'(img[r][c]);
        while (ready != 3'b111) begin @(posedge clk); #1; end
        @(posedge clk); #1;
      end
    end
    pix_valid = 1'b0;
    repeat (20) @(posedge clk);
    for (int v = 1; v <= 3; v++) begin
      checks++;
      if (n_out[v] != (W - 2) * (H - 2)) begin failures++; $display("FAIL variant %0d: %0d outputs", v, n_out[v]); end
      $display("variant %0d: mean |approximate - exact| = %0.2f", v, real'(err[v]) / real'(n_out[v]));
    end
    // the variants must actually differ somewhere
    checks++;
    if (n_diff == 0) begin failures++; $display("FAIL the three variants never differ"); end
    $display("outputs where the variants differ: %0d", n_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
