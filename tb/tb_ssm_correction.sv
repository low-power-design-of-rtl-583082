// tb_ssm_correction: exhaustive check of the correction term for M = 8 and
// M = 4 over every input combination.
module tb_ssm_correction;
  import ssm_ref_pkg::*;

  logic [9:0] in;
  logic [7:0] c8;
  logic [3:0] c4;
  int checks = 0, failures = 0;

  ssm_correction dut8 (
    .sel(in[9:8]), .a_top(in[7:5]), .b_top(in[4:2]), .a_lmsb(in[1]), .b_lmsb(in[0]), .corr(c8)
  );
  ssm_correction #(.M(4)) dut4 (
    .sel(in[9:8]), .a_top(in[7:5]), .b_top(in[4:2]), .a_lmsb(in[1]), .b_lmsb(in[0]), .corr(c4)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      in = 10'(i);
      #1;
      checks += 2;
      if (longint'(c8) != corr_ref(in[9], in[8], int'(in[7:5]), int'(in[4:2]), in[1], in[0], 8)) begin
        failures++;
        $display("FAIL M=8 in=%b corr=%0d", in, c8);
      end
      if (longint'(c4) != corr_ref(in[9], in[8], int'(in[7:5]), int'(in[4:2]), in[1], in[0], 4)) begin
        failures++;
        $display("FAIL M=4 in=%b corr=%0d", in, c4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
