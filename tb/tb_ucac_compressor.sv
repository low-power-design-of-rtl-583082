// tb_ucac_compressor: exhaustive check of the three approximate compressors
// against their truth tables and error-distance columns.
module tb_ucac_compressor;
  import ssm_ref_pkg::*;

  logic [3:0] y;
  logic [3:1] sum;
  int checks = 0, failures = 0;

  for (genvar v = 1; v <= 3; v++) begin : g_dut
    ucac_compressor #(.VARIANT(v)) dut (
      .y1(y[3]), .y2(y[2]), .y3(y[1]), .y4(y[0]), .sum(sum[v])
    );
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++) begin
      y = 4'(r);
      #1;
      for (int v = 1; v <= 3; v++) begin
        int ed;
        int exp_ed;
        checks++;
        if (int'(sum[v]) != ucac_ref(v, y[3], y[2], y[1], y[0])) begin
          failures++;
          $display("FAIL UCAC%0d y=%b sum=%0d", v, y, sum[v]);
        end
        ed = int'(sum[v]) - $countones(y);
        exp_ed = (v == 1) ? UCAC1_ED[r] : (v == 2) ? UCAC2_ED[r] : UCAC3_ED[r];
        checks++;
        if (ed != exp_ed) begin
          failures++;
          $display("FAIL UCAC%0d y=%b ED=%0d expected %0d", v, y, ed, exp_ed);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
