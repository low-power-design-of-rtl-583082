// sobel_edge_detector: streaming Sobel edge detector on approximate MACs.
//
// Grey pixels arrive in raster order over a valid/ready handshake
// (pix_valid && pix_ready = accepted). sobel_window keeps the last two lines
// and forms the 3x3 window; for every window that lies fully inside the
// image, sobel_engine computes Gx and Gy with two multiply-accumulate units
// built on the static segmented approximate multiplier and outputs
// min(|Gx| + |Gy|, 255) with the window centre's coordinates. Border pixels
// (first two rows and columns of the frame) are accepted without producing
// an output, so a W x H frame yields (W-2) x (H-2) edge pixels.
//
// Timing: a border pixel is accepted every cycle. An interior pixel is
// accepted, its window is flagged the next cycle and the engine then needs
// 10 cycles; pix_ready is low meanwhile, so an interior pixel costs 12
// cycles and edge_valid pulses 11 cycles after the accept. There is no
// output back-pressure: edge_valid is a one-cycle pulse.
// Reset: synchronous, active low.
//
// The image size (256 x 256), the Sobel masks and the multiplier follow the
// document; the handshake, the border policy and the schedule are this
// design's own choices.
module sobel_edge_detector
  import sobel_pkg::*;
#(
  parameter int unsigned IMG_W       = 256,
  parameter int unsigned IMG_H       = 256,
  parameter int unsigned SEG_W       = PIX_W / 2,
  parameter int unsigned APPROX_COLS = SEG_W / 2,
  parameter int unsigned VARIANT     = 1,
  parameter int unsigned CW          = $clog2(IMG_W),
  parameter int unsigned RW          = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pix_valid,
  output logic          pix_ready,
  input  pixel_t        pix_data,
  output logic          edge_valid,
  output pixel_t        edge_data,
  output logic [RW-1:0] edge_row,
  output logic [CW-1:0] edge_col
);

  window_t       win;
  logic          win_valid, busy, accept;
  logic [RW-1:0] win_row;
  logic [CW-1:0] win_col;

  assign pix_ready = !busy && !win_valid;
  assign accept    = pix_valid && pix_ready;

  sobel_window #(.IMG_W(IMG_W), .IMG_H(IMG_H), .CW(CW), .RW(RW)) u_window (
    .clk(clk), .rst_n(rst_n),
    .in_valid(accept), .in_pix(pix_data),
    .win(win), .win_valid(win_valid), .win_row(win_row), .win_col(win_col)
  );

  sobel_engine #(.SEG_W(SEG_W), .APPROX_COLS(APPROX_COLS), .VARIANT(VARIANT)) u_engine (
    .clk(clk), .rst_n(rst_n),
    .start(win_valid), .win(win),
    .busy(busy), .done(edge_valid), .edge_pix(edge_data),
    .gx(), .gy(), .saturated(), .sel_x(), .sel_y()
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      edge_row <= '0;
      edge_col <= '0;
    end else if (win_valid) begin
      edge_row <= win_row;
      edge_col <= win_col;
    end
  end

  // a window is only flagged when the engine can take it
  assert property (@(posedge clk) disable iff (!rst_n) win_valid |-> !busy);

endmodule
