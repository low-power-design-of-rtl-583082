// appx_array_mult: M x M unsigned multiplier with approximate low columns.
//
// The partial products a[i] & b[j-i] are grouped by column j (weight 2^j).
// In the APPROX_COLS least significant columns every complete group of four
// partial products is replaced by one ucac_compressor, whose single sum bit
// stays in the same column and whose carries are dropped; bits left over
// after the groups of four are kept exactly. The remaining, more significant
// columns are summed exactly. The result never exceeds the exact product, so
// it always fits in 2*M bits.
//
// Using the approximate compressors inside the multiplier's array follows the
// design intent; which columns are approximated (the lower quarter of the
// product's columns, APPROX_COLS = M/2), the grouping of four consecutive bits from the top of the column, and
// the treatment of leftover bits are this design's own choices. The column
// sums are written as additions and left to synthesis to map onto an adder
// array. Approximating more columns is possible but costly in accuracy: a
// compressor drops a lone 1 in its group (variants 1 and 2), so with a
// small operand whole product bits vanish. Purely combinational.
module appx_array_mult #(
  parameter int unsigned M           = 8,
  parameter int unsigned APPROX_COLS = M / 2,
  parameter int unsigned VARIANT     = 1
) (
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [2*M-1:0] p
);

  localparam int unsigned NCOL = 2 * M - 1;
  localparam int unsigned CW   = $clog2(M + 1);

  logic [CW-1:0] col_cnt [NCOL];

  for (genvar j = 0; j < NCOL; j++) begin : g_col
    localparam int unsigned LO = (j < M) ? 0 : j - M + 1;
    localparam int unsigned HI = (j < M) ? j : M - 1;
    localparam int unsigned H  = HI - LO + 1;
    localparam int unsigned G  = (j < APPROX_COLS) ? H / 4 : 0;

    logic [H-1:0] pp;
    for (genvar k = 0; k < H; k++) begin : g_pp
      assign pp[k] = a[LO+k] & b[j-LO-k];
    end

    if (G > 0) begin : g_appx
      logic [G-1:0] s;
      for (genvar g = 0; g < G; g++) begin : g_cmp
        ucac_compressor #(.VARIANT(VARIANT)) u_cmp (
          .y1 (pp[H-1-4*g]),
          .y2 (pp[H-2-4*g]),
          .y3 (pp[H-3-4*g]),
          .y4 (pp[H-4-4*g]),
          .sum(s[g])
        );
      end
      // leftover bits pp[H-4*G-1:0] are counted exactly
      if (H > 4 * G) begin : g_left
        always_comb begin
          col_cnt[j] = '0;
          for (int unsigned g = 0; g < G; g++) col_cnt[j] += CW'(s[g]);
          for (int unsigned k = 0; k < H - 4 * G; k++) col_cnt[j] += CW'(pp[k]);
        end
      end else begin : g_full
        always_comb begin
          col_cnt[j] = '0;
          for (int unsigned g = 0; g < G; g++) col_cnt[j] += CW'(s[g]);
        end
      end
    end else begin : g_exact
      always_comb begin
        col_cnt[j] = '0;
        for (int unsigned k = 0; k < H; k++) col_cnt[j] += CW'(pp[k]);
      end
    end
  end

  always_comb begin
    p = '0;
    for (int unsigned j = 0; j < NCOL; j++) p += (2*M)'(col_cnt[j]) << j;
  end

endmodule
