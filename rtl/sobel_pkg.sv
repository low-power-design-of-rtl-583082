// sobel_pkg: shared widths, types and the two Sobel masks.
//
// The detector works on 8-bit grey pixels. Gradients are accumulated in a
// 16-bit signed accumulator, and mask coefficients travel as 8-bit signed
// values, so one multiply-accumulate step takes an 8-bit pixel and an 8-bit
// coefficient. The masks are the standard Sobel pair:
//
//   horizontal edges (Gy)      vertical edges (Gx)
//     -1 -2 -1                   1  0 -1
//      0  0  0                   2  0 -2
//      1  2  1                   1  0 -1
//
// Taps are numbered 0..8 in raster order over the 3x3 window (tap = 3*row +
// col, row 0 = oldest image line, col 0 = leftmost pixel).
package sobel_pkg;

  localparam int unsigned PIX_W  = 8;
  localparam int unsigned COEF_W = 8;
  localparam int unsigned ACC_W  = 16;
  localparam int unsigned NTAPS  = 9;

  typedef logic        [PIX_W-1:0]  pixel_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // 3x3 window, window[row][col]
  typedef pixel_t [2:0][2:0] window_t;

  function automatic coef_t gx_coef(input int unsigned tap);
    case (tap)
      0: return  coef_t'(1);
      2: return -coef_t'(1);
      3: return  coef_t'(2);
      5: return -coef_t'(2);
      6: return  coef_t'(1);
      8: return -coef_t'(1);
      default: return '0;
    endcase
  endfunction

  function automatic coef_t gy_coef(input int unsigned tap);
    case (tap)
      0: return -coef_t'(1);
      1: return -coef_t'(2);
      2: return -coef_t'(1);
      6: return  coef_t'(1);
      7: return  coef_t'(2);
      8: return  coef_t'(1);
      default: return '0;
    endcase
  endfunction

endpackage
