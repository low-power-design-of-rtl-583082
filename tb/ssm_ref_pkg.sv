// ssm_ref_pkg: reference models for the testbenches.
//
// Integer models of the approximate compressors (from their truth tables),
// of the approximate array multiplier, of the segmentation correction, of
// the segmented multiplier, and of the Sobel masks. They are written
// independently of the RTL, as plain arithmetic on 64-bit integers.
package ssm_ref_pkg;

  // sum output of the three compressors, bit index = {y1,y2,y3,y4}
  localparam logic [15:0] UCAC_TT [1:3] = '{16'hfee8, 16'heee0, 16'hfafa};

  // error distance (sum - number of ones) listed for each row
  localparam int UCAC1_ED [16] = '{0,-1,-1,-1,-1,-1,-1,-2,-1,-1,-1,-2,-1,-2,-2,-3};
  localparam int UCAC2_ED [16] = '{0,-1,-1,-2,-1,-1,-1,-2,-1,-1,-1,-2,-2,-2,-2,-3};
  localparam int UCAC3_ED [16] = '{0, 0,-1,-1, 0,-1,-1,-2,-1,-1,-2,-2,-1,-2,-2,-3};

  function automatic int ucac_ref(int variant, bit y1, bit y2, bit y3, bit y4);
    return int'(UCAC_TT[variant][{y1, y2, y3, y4}]);
  endfunction

  // Approximate m x m product. Column j holds a[i]&b[j-i] for i = lo..hi,
  // listed from i = hi down to i = lo. In columns j < k each full group of
  // four (from the top of that list) counts as one compressor output.
  function automatic longint unsigned appx_ref(longint unsigned a, longint unsigned b,
                                               int m, int k, int variant);
    longint unsigned total = 0;
    for (int j = 0; j < 2 * m - 1; j++) begin
      bit bits [$];
      int lo = (j < m) ? 0 : j - m + 1;
      int hi = (j < m) ? j : m - 1;
      int cnt = 0;
      for (int i = hi; i >= lo; i--) bits.push_back(a[i] & b[j - i]);
      if (j < k) begin
        while (bits.size() >= 4) begin
          cnt += ucac_ref(variant, bits[0], bits[1], bits[2], bits[3]);
          repeat (4) void'(bits.pop_front());
        end
      end
      foreach (bits[q]) cnt += int'(bits[q]);
      total += longint'(cnt) << j;
    end
    return total;
  endfunction

  function automatic longint unsigned corr_ref(bit alpha_a, bit alpha_b, int a_top, int b_top,
                                               bit a_lmsb, bit b_lmsb, int m);
    if (alpha_a && alpha_b) return longint'(a_top + b_top + 1) * (64'd1 << (m - 4));
    if (alpha_a)            return b_lmsb ? 3 * (64'd1 << (m - 3)) : 0;
    if (alpha_b)            return a_lmsb ? 3 * (64'd1 << (m - 3)) : 0;
    return 0;
  endfunction

  function automatic longint unsigned ssm_ref(longint unsigned a, longint unsigned b,
                                              int n, int m, int k, int variant);
    int s = n - m;
    bit ha = (a >> m) != 0;
    bit hb = (b >> m) != 0;
    longint unsigned sa = ha ? (a >> s) : (a % (64'd1 << m));
    longint unsigned sb = hb ? (b >> s) : (b % (64'd1 << m));
    longint unsigned p  = appx_ref(sa, sb, m, k, variant)
                        + corr_ref(ha, hb, int'(a >> (n - 3)), int'(b >> (n - 3)),
                                   a[m-1], b[m-1], m);
    return p << (s * (int'(ha) + int'(hb)));
  endfunction

  // signed product of an unsigned pixel and a signed coefficient, 8-bit
  // operands, as the MAC forms it
  function automatic longint mac_term(int pix, int coef, int k, int variant);
    longint unsigned p = ssm_ref(longint'(pix), longint'(coef < 0 ? -coef : coef), 8, 4, k, variant);
    return (coef < 0) ? -longint'(p) : longint'(p);
  endfunction

  localparam int GX [9] = '{ 1, 0, -1,  2, 0, -2,  1, 0, -1};
  localparam int GY [9] = '{-1, -2, -1, 0, 0, 0,  1, 2, 1};

  // wrap to a 16-bit two's complement value
  function automatic int wrap16(longint v);
    return int'(shortint'(v));
  endfunction

  function automatic int mag_ref(int gx, int gy);
    int s = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return (s > 255) ? 255 : s;
  endfunction

  // Sobel on a 3x3 window p[3*row+col] through the 8-bit approximate MAC
  // (segment width 4, the k lowest columns approximated with the given
  // compressor)
  function automatic void sobel_ref(input int p [9], output int gx, output int gy,
                                    output int mag, input int variant = 1, input int k = 2);
    longint sx = 0, sy = 0;
    for (int t = 0; t < 9; t++) begin
      sx = longint'(wrap16(sx + mac_term(p[t], GX[t], k, variant)));
      sy = longint'(wrap16(sy + mac_term(p[t], GY[t], k, variant)));
    end
    gx  = int'(sx);
    gy  = int'(sy);
    mag = mag_ref(gx, gy);
  endfunction

  // exact Sobel magnitude, for judging the approximation
  function automatic int sobel_exact(input int p [9]);
    int sx = 0, sy = 0;
    for (int t = 0; t < 9; t++) begin
      sx += p[t] * GX[t];
      sy += p[t] * GY[t];
    end
    return mag_ref(sx, sy);
  endfunction

endpackage
