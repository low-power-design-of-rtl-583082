// ucac_compressor: approximate 4-input compressor with a single sum output.
//
// An exact 4:2 compressor turns four bits of one partial-product column into
// a sum and carries. These compressors keep only one output bit, of the
// column's own weight, and drop every carry; the difference (sum - number of
// ones) is always zero or negative. Three variants are selectable:
//
//   VARIANT 1: sum = (y1 & y2) | (y3 & y4) | ((y1 | y2) & (y3 | y4))
//              i.e. 1 when at least two inputs are 1
//   VARIANT 2: sum = (y1 | y2) & (y3 | y4)
//   VARIANT 3: sum = y2 | y4
//
// The gate structure of the three variants and their truth tables follow the
// published designs; variant 3 is defined by its truth table (sum equals
// y2 | y4 on all sixteen rows). Purely combinational, no timing of its own.
module ucac_compressor #(
  parameter int unsigned VARIANT = 1
) (
  input  logic y1,
  input  logic y2,
  input  logic y3,
  input  logic y4,
  output logic sum
);

  initial begin
    assert (VARIANT >= 1 && VARIANT <= 3)
      else $error("ucac_compressor: VARIANT must be 1, 2 or 3");
  end

  if (VARIANT == 1) begin : g_ucac1
    logic and12, and34, or12, or34;
    assign and12 = y1 & y2;
    assign and34 = y3 & y4;
    assign or12  = y1 | y2;
    assign or34  = y3 | y4;
    assign sum   = (and12 | and34) | (or12 & or34);
  end else if (VARIANT == 2) begin : g_ucac2
    assign sum = (y1 | y2) & (y3 | y4);
  end else begin : g_ucac3
    assign sum = y2 | y4;
  end

endmodule
