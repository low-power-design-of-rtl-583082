// ssm_mac: multiply-accumulate unit built on the segmented approximate
// multiplier.
//
// Each enabled cycle adds a * b to the accumulator, where a is an unsigned
// DATA_W-bit sample (a pixel) and b a signed DATA_W-bit coefficient. The
// multiplier is unsigned, so the coefficient is handled in sign-magnitude
// form: |b| goes to ssm_mult (N = DATA_W, M = SEG_W) and the product is
// negated when b is negative. With clr high the accumulator is loaded with
// the product instead of adding to it, which starts a new sum without a
// bubble cycle. The accumulator is ACC_W bits, two's complement, and wraps
// on overflow; the Sobel sums it serves stay within +-2^12.
//
// Timing: acc is updated on the rising clock edge after en; a result of k
// products is available k cycles after the first one was presented.
// Reset: synchronous, active low, clears acc.
//
// The 8-bit operands and the 16-bit accumulator (16 flip-flops in total)
// match the size of the published MAC; the sign-magnitude wrapping, the clr
// input and SEG_W = DATA_W/2 are this design's choices.
module ssm_mac #(
  parameter int unsigned DATA_W      = 8,
  parameter int unsigned ACC_W       = 16,
  parameter int unsigned SEG_W       = DATA_W / 2,
  parameter int unsigned APPROX_COLS = SEG_W / 2,
  parameter int unsigned VARIANT     = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     clr,
  input  logic        [DATA_W-1:0] a,
  input  logic signed [DATA_W-1:0] b,
  output logic signed [ACC_W-1:0]  acc,
  output logic        [1:0]        sel     // segment select of this product
);

  logic [DATA_W-1:0]   b_mag;
  logic [2*DATA_W-1:0] prod;
  logic [ACC_W-1:0]    prod_ext, term;

  assign b_mag = b[DATA_W-1] ? DATA_W'(-b) : DATA_W'(b);

  ssm_mult #(
    .N          (DATA_W),
    .M          (SEG_W),
    .APPROX_COLS(APPROX_COLS),
    .VARIANT    (VARIANT)
  ) u_mult (
    .a  (a),
    .b  (b_mag),
    .p  (prod),
    .sel(sel)
  );

  assign prod_ext = ACC_W'(prod);
  assign term     = b[DATA_W-1] ? -prod_ext : prod_ext;

  always_ff @(posedge clk) begin
    if (!rst_n)   acc <= '0;
    else if (en)  acc <= (clr ? ACC_W'(0) : acc) + term;
  end

endmodule
