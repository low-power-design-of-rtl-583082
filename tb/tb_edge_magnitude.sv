// tb_edge_magnitude: checks min(|gx|+|gy|, 255) and the saturation flag on
// corner values and random gradients.
module tb_edge_magnitude;
  import ssm_ref_pkg::*;

  logic signed [15:0] gx, gy;
  logic [7:0] mag;
  logic sat;
  int checks = 0, failures = 0;

  edge_magnitude dut (.gx(gx), .gy(gy), .mag(mag), .saturated(sat));

  task automatic check(int x, int y);
    int r;
    gx = 16'(x); gy = 16'(y);
    #1;
    r = mag_ref(int'(gx), int'(gy));
    checks++;
    if (int'(mag) != r || sat != ((int'(gx) < 0 ? -int'(gx) : int'(gx)) + (int'(gy) < 0 ? -int'(gy) : int'(gy)) > 255)) begin
      failures++;
      if (failures < 10) $display("FAIL gx=%0d gy=%0d mag=%0d sat=%b ref %0d", gx, gy, mag, sat, r);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int corners [10] = '{0, 1, -1, 127, -128, 255, -255, 256, 32767, -32768};
    foreach (corners[i]) foreach (corners[j]) check(corners[i], corners[j]);
    for (int i = 0; i < 20000; i++)
      check(int'($urandom_range(0, 600)) - 300, int'($urandom_range(0, 600)) - 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
