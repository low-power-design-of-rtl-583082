// tb_appx_array_mult: exhaustive check of the 8x8 and 4x4 approximate array
// multipliers against the reference model, for all three compressors, plus
// the bounds of the error (never above the exact product) and exactness when
// no column is approximated.
module tb_appx_array_mult;
  import ssm_ref_pkg::*;

  logic [7:0]  a8, b8;
  logic [15:0] p8 [1:3];
  logic [15:0] p8_exact;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  int checks = 0, failures = 0;
  longint max_err = 0;

  for (genvar v = 1; v <= 3; v++) begin : g_dut
    appx_array_mult #(.VARIANT(v)) dut (.a(a8), .b(b8), .p(p8[v]));
  end
  appx_array_mult #(.M(8), .APPROX_COLS(0)) dut_exact (.a(a8), .b(b8), .p(p8_exact));
  appx_array_mult #(.M(4)) dut4 (.a(a4), .b(b4), .p(p4));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        longint unsigned exact;
        exact = longint'(i) * longint'(j);
        a8 = 8'(i); b8 = 8'(j);
        a4 = 4'(i); b4 = 4'(j);
        #1;
        for (int v = 1; v <= 3; v++) begin
          longint unsigned r;
          r = appx_ref(longint'(i), longint'(j), 8, 4, v);
          checks++;
          if (longint'(p8[v]) != r || r > exact) begin
            failures++;
            if (failures < 10) $display("FAIL v%0d %0d*%0d = %0d, ref %0d", v, i, j, p8[v], r);
          end
          if (longint'(exact - r) > max_err) max_err = longint'(exact - r);
        end
        checks++;
        if (longint'(p8_exact) != exact) begin
          failures++;
          if (failures < 10) $display("FAIL exact %0d*%0d = %0d", i, j, p8_exact);
        end
        if (i < 16 && j < 16) begin
          checks++;
          if (longint'(p4) != appx_ref(longint'(i), longint'(j), 4, 2, 1)) begin
            failures++;
            $display("FAIL 4x4 %0d*%0d = %0d", i, j, p4);
          end
        end
      end
    end
    // the approximation must actually drop something
    checks++;
    if (max_err == 0) failures++;
    $display("largest error of the 8x8 multipliers: %0d", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
