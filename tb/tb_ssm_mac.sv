// tb_ssm_mac: drives the 8-bit MAC with random pixels, signed coefficients
// and random clear/enable patterns, and checks the accumulator every cycle
// against a model built on the reference multiplier (16-bit wrap-around,
// one-cycle update latency, clear loads the product, reset clears).
module tb_ssm_mac;
  import ssm_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        en, clr;
  logic [7:0]  a;
  logic signed [7:0] b;
  logic signed [15:0] acc;
  logic [1:0]  sel;
  int checks = 0, failures = 0;
  int model = 0;
  int n_clr = 0, n_neg = 0, n_hi = 0, n_wrap = 0;

  ssm_mac dut (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .a(a), .b(b), .acc(acc), .sel(sel));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0; clr = 1'b0; a = '0; b = '0;
    @(posedge clk); #1;
    @(posedge clk); #1;
    checks++;
    if (acc != 0) begin failures++; $display("FAIL reset acc=%0d", acc); end
    rst_n = 1'b1;
    for (int i = 0; i < 50000; i++) begin
      int pa, cb;
      longint t;
      pa = int'($urandom_range(0, 255));
      cb = int'($urandom_range(0, 255)) - 128;
      if ($urandom_range(0, 3) == 0) cb = int'($urandom_range(0, 4)) - 2;
      en  = ($urandom_range(0, 7) != 0);
      clr = ($urandom_range(0, 9) == 0);
      a = 8'(pa); b = 8'(cb);
      t = mac_term(pa, cb, 2, 1);
      if (en) begin
        longint nxt;
        nxt = (clr ? 0 : longint'(model)) + t;
        if (nxt != longint'(wrap16(nxt))) n_wrap++;
        model = wrap16(nxt);
        if (clr) n_clr++;
        if (cb < 0) n_neg++;
        if (sel != 2'b00) n_hi++;
      end
      @(posedge clk); #1;
      checks++;
      if (int'(acc) != model) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d acc=%0d model=%0d", i, acc, model);
      end
    end
    checks++;
    if (n_clr == 0 || n_neg == 0 || n_hi == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL coverage clr=%0d neg=%0d high=%0d wrap=%0d", n_clr, n_neg, n_hi, n_wrap);
    end
    // reset in the middle clears the accumulator
    rst_n = 1'b0;
    @(posedge clk); #1;
    checks++;
    if (acc != 0) begin failures++; $display("FAIL reset acc=%0d", acc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
