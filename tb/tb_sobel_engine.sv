// tb_sobel_engine: presents random and structured 3x3 windows to the engine
// and checks Gx, Gy and the edge pixel against the reference MAC model, the
// 10-cycle start-to-done latency, and that busy covers the computation.
module tb_sobel_engine;
  import sobel_pkg::*;
  import ssm_ref_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    start;
  window_t win;
  logic    busy, done, saturated;
  pixel_t  edge_pix;
  acc_t    gx, gy;
  logic [1:0] sel_x, sel_y;
  int checks = 0, failures = 0, n_sat = 0, n_unsat = 0;

  sobel_engine dut (
    .clk(clk), .rst_n(rst_n), .start(start), .win(win),
    .busy(busy), .done(done), .edge_pix(edge_pix), .gx(gx), .gy(gy),
    .saturated(saturated), .sel_x(sel_x), .sel_y(sel_y)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p [9];
    int rgx, rgy, rmag, cyc;
    rst_n = 1'b0; start = 1'b0; win = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int style;
      style = int'($urandom_range(0, 3));
      for (int t = 0; t < 9; t++) begin
        case (style)
          0: p[t] = int'($urandom_range(0, 255));
          1: p[t] = int'($urandom_range(0, 15));                     // low segment only
          2: p[t] = (t % 3 == 0) ? int'($urandom_range(0, 40)) : int'($urandom_range(150, 255));
          default: p[t] = 100 + int'($urandom_range(0, 6));          // nearly flat
        endcase
        win[t / 3][t % 3] = 8'(p[t]);
      end
      sobel_ref(p, rgx, rgy, rmag);
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      cyc = 1;
      while (!done && cyc < 50) begin
        checks++;
        if (!busy) begin failures++; $display("FAIL busy low before done"); end
        @(posedge clk); #1;
        cyc++;
      end
      checks++;
      if (cyc != 10) begin failures++; $display("FAIL latency %0d", cyc); end
      checks++;
      if (int'(gx) != rgx || int'(gy) != rgy || int'(edge_pix) != rmag) begin
        failures++;
        if (failures < 10) $display("FAIL gx=%0d/%0d gy=%0d/%0d edge=%0d/%0d",
                                    gx, rgx, gy, rgy, edge_pix, rmag);
      end
      if (saturated) n_sat++; else n_unsat++;
      @(posedge clk); #1;
      checks++;
      if (busy || done) begin failures++; $display("FAIL engine not idle after done"); end
    end
    checks++;
    if (n_sat == 0 || n_unsat == 0) begin failures++; $display("FAIL sat %0d unsat %0d", n_sat, n_unsat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
