// sobel_engine: computes one Sobel edge pixel from a 3x3 window.
//
// On start the engine walks the nine taps of the window in raster order, one
// per cycle, and feeds each pixel with its Gx and Gy mask coefficient to two
// ssm_mac units; the first tap clears the accumulators. Taps whose
// coefficient is zero go through the MAC like the others (the segmented
// multiplier returns zero for a zero operand). After the ninth tap the two
// accumulators hold Gx and Gy, and edge_magnitude turns them into
// min(|Gx| + |Gy|, 255).
//
// Interface and timing: start is taken only when busy is low. busy is high
// from the cycle after start until done. The window must stay stable while
// busy. done pulses for one cycle, 10 cycles after start, together with
// edge, gx, gy and saturated. One pixel per 10 cycles at most.
// Reset: synchronous, active low.
//
// The masks are the published Sobel masks; computing them with a MAC built
// on the approximate multiplier follows the design's intent, while the
// sequential one-tap-per-cycle schedule is this design's own choice.
module sobel_engine
  import sobel_pkg::*;
#(
  parameter int unsigned SEG_W       = PIX_W / 2,
  parameter int unsigned APPROX_COLS = SEG_W / 2,
  parameter int unsigned VARIANT     = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  window_t win,
  output logic    busy,
  output logic    done,
  output pixel_t  edge_pix,
  output acc_t    gx,
  output acc_t    gy,
  output logic    saturated,
  output logic [1:0] sel_x,   // segment select of the current Gx product
  output logic [1:0] sel_y    // segment select of the current Gy product
);

  typedef enum logic [1:0] {S_IDLE, S_MAC, S_DONE} state_t;

  state_t      state;
  logic [3:0]  tap;
  logic        mac_en;
  pixel_t      tap_pix;
  coef_t       cx, cy;

  assign mac_en  = (state == S_MAC);
  assign tap_pix = win[tap / 3][tap % 3];
  assign cx      = gx_coef(32'(tap));
  assign cy      = gy_coef(32'(tap));
  assign busy    = (state != S_IDLE);
  assign done    = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      tap   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_MAC;
          tap   <= '0;
        end
        S_MAC: begin
          if (tap == 4'(NTAPS - 1)) state <= S_DONE;
          else                      tap   <= tap + 4'd1;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  ssm_mac #(
    .DATA_W(PIX_W), .ACC_W(ACC_W), .SEG_W(SEG_W),
    .APPROX_COLS(APPROX_COLS), .VARIANT(VARIANT)
  ) u_mac_x (
    .clk(clk), .rst_n(rst_n), .en(mac_en), .clr(tap == 4'd0),
    .a(tap_pix), .b(cx), .acc(gx), .sel(sel_x)
  );

  ssm_mac #(
    .DATA_W(PIX_W), .ACC_W(ACC_W), .SEG_W(SEG_W),
    .APPROX_COLS(APPROX_COLS), .VARIANT(VARIANT)
  ) u_mac_y (
    .clk(clk), .rst_n(rst_n), .en(mac_en), .clr(tap == 4'd0),
    .a(tap_pix), .b(cy), .acc(gy), .sel(sel_y)
  );

  edge_magnitude #(.IN_W(ACC_W), .OUT_W(PIX_W)) u_mag (
    .gx(gx), .gy(gy), .mag(edge_pix), .saturated(saturated)
  );

  assert property (@(posedge clk) disable iff (!rst_n) (state == S_MAC) |-> tap < 4'(NTAPS));

endmodule
