// ssm_mult: static segmented approximate multiplier (N x N -> 2N, unsigned).
//
// Each N-bit operand is replaced by an M-bit segment. alpha = OR of the
// operand's upper N-M bits a[N-1:M]: if any is set, the high segment
// a[N-1:N-M] is used, otherwise the low segment a[M-1:0], which then holds
// the whole operand exactly. The two segments are multiplied by an M x M
// approximate array multiplier (appx_array_mult), a correction term from
// ssm_correction is added, and the 2M-bit result is placed back at its
// weight by the output mux selected by {alpha_a, alpha_b}:
//
//   00       -> {0 (2N-2M bits), P}
//   01, 10   -> {0 (N-M), P, 0 (N-M)}
//   11       -> {P, 0 (2N-2M)}
//
// This is the structure of the published block diagram, with N = 16 and
// M = 8 as defaults. The inner multiplier's compressors and the correction
// formula are this design's choices (see those modules). Purely
// combinational. sel is brought out so that users can observe which
// segments were taken.
module ssm_mult #(
  parameter int unsigned N           = 16,
  parameter int unsigned M           = 8,
  parameter int unsigned APPROX_COLS = M / 2,
  parameter int unsigned VARIANT     = 1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p,
  output logic [1:0]     sel   // {alpha_a, alpha_b}
);

  initial begin
    assert (N > M && M >= 4) else $error("ssm_mult: need N > M >= 4");
  end

  localparam int unsigned S = N - M;   // shift of a high segment

  logic           alpha_a, alpha_b;
  logic [M-1:0]   seg_a, seg_b;
  logic [2*M-1:0] prod, prod_c;
  logic [M-1:0]   corr;

  assign alpha_a = |a[N-1:M];
  assign alpha_b = |b[N-1:M];
  assign seg_a   = alpha_a ? a[N-1:S] : a[M-1:0];
  assign seg_b   = alpha_b ? b[N-1:S] : b[M-1:0];
  assign sel     = {alpha_a, alpha_b};

  appx_array_mult #(
    .M          (M),
    .APPROX_COLS(APPROX_COLS),
    .VARIANT    (VARIANT)
  ) u_core (
    .a(seg_a),
    .b(seg_b),
    .p(prod)
  );

  ssm_correction #(.M(M)) u_corr (
    .sel   (sel),
    .a_top (a[N-1:N-3]),
    .b_top (b[N-1:N-3]),
    .a_lmsb(a[M-1]),
    .b_lmsb(b[M-1]),
    .corr  (corr)
  );

  assign prod_c = prod + (2*M)'(corr);

  always_comb begin
    unique case (sel)
      2'b00:          p = (2*N)'(prod_c);
      2'b01, 2'b10:   p = (2*N)'(prod_c) << S;
      default:        p = (2*N)'(prod_c) << (2 * S);
    endcase
  end

endmodule
