// tb_ssm_mult: checks the segmented multiplier at its default 16x16 size
// (m = 8) with corner cases and random operands spread over all four
// segment combinations, and the 8x8 (m = 4) version exhaustively. Besides
// the reference model it checks that zero operands give zero, that operands
// that fit in the low segment are multiplied exactly where the inner
// multiplier is exact, and the relative error stays bounded.
module tb_ssm_mult;
  import ssm_ref_pkg::*;

  logic [15:0] a, b;
  logic [31:0] p;
  logic [1:0]  sel;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [1:0]  sel8;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};
  real worst_rel = 0.0;
  real sum_rel = 0.0;
  int  n_rel = 0;

  ssm_mult dut (.a(a), .b(b), .p(p), .sel(sel));
  ssm_mult #(.N(8), .M(4)) dut8 (.a(a8), .b(b8), .p(p8), .sel(sel8));

  task automatic check16(longint unsigned x, longint unsigned y);
    longint unsigned r;
    a = 16'(x); b = 16'(y);
    #1;
    r = ssm_ref(x, y, 16, 8, 4, 1);
    seen[sel]++;
    checks++;
    if (longint'(p) != r) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d = %0d, ref %0d", x, y, p, r);
    end
    checks++;
    if (sel != {x >= 256, y >= 256}) begin
      failures++;
      $display("FAIL sel %0d*%0d = %b", x, y, sel);
    end
    if (x >= 1024 && y >= 1024) begin
      real rel;
      rel = (real'(p) - real'(x * y)) / real'(x * y);
      if (rel < 0) rel = -rel;
      if (rel > worst_rel) worst_rel = rel;
      sum_rel += rel;
      n_rel++;
    end
  endtask

  function automatic longint unsigned rnd_op();
    int kind = int'($urandom_range(0, 2));
    if (kind == 0) return longint'($urandom_range(0, 255));
    if (kind == 1) return longint'($urandom_range(256, 4095));
    return longint'($urandom_range(4096, 65535));
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned corners [8] = '{0, 1, 255, 256, 257, 32768, 65534, 65535};
    foreach (corners[i]) foreach (corners[j]) check16(corners[i], corners[j]);
    // zero gives zero in every segment combination
    for (int i = 0; i < 200; i++) begin
      longint unsigned x;
      x = rnd_op();
      check16(x, 0);
      checks++;
      if (p != 0) begin failures++; $display("FAIL %0d*0 = %0d", x, p); end
    end
    for (int i = 0; i < 200000; i++) check16(rnd_op(), rnd_op());
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL segment case %b never seen", 2'(s)); end
    end
    // both operands at least 10 bits: mean relative error of a few per cent
    checks++;
    if (sum_rel / n_rel > 0.05) begin failures++; $display("FAIL mean relative error %f", sum_rel / n_rel); end
    $display("relative error (operands >= 1024): mean %f, worst %f", sum_rel / n_rel, worst_rel);

    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        checks++;
        if (longint'(p8) != ssm_ref(longint'(i), longint'(j), 8, 4, 2, 1)) begin
          failures++;
          if (failures < 10) $display("FAIL 8x8 %0d*%0d = %0d", i, j, p8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
