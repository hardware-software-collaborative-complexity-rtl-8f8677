// Reference models used by the testbenches, written directly from the
// HEVC intra prediction rules and the Sobel/histogram definition, without
// sharing code with the RTL.
package tb_ref_pkg;

  typedef int unsigned u8arr_t [0:128];   // index 0 = corner, i = sample i-1

  function automatic int angle_of(int mode);
    int t [17] = '{32, 26, 21, 17, 13, 9, 5, 2, 0, -2, -5, -9, -13, -17, -21, -26, -32};
    if (mode <= 18) return t[mode - 2];
    return t[34 - mode];
  endfunction

  function automatic int dc_of(int n, u8arr_t top, u8arr_t left);
    int s = 0, lg = $clog2(n);
    for (int i = 1; i <= n; i++) s += int'(top[i]) + int'(left[i]);
    return (s + n) >> (lg + 1);
  endfunction

  // HEVC predSamples[x][y] (no filtering) for a PU of size n.
  function automatic int pred_px(int mode, int n, int x, int y, u8arr_t top, u8arr_t left);
    int lg = $clog2(n);
    if (mode == 0)
      return ((n - 1 - x) * int'(left[y + 1]) + (x + 1) * int'(top[n + 1]) +
              (n - 1 - y) * int'(top[x + 1]) + (y + 1) * int'(left[n + 1]) + n) >> (lg + 1);
    if (mode == 1) return dc_of(n, top, left);
    begin
      int a = angle_of(mode);
      int refa [-128:128];
      int inv, idx, fact, ii, jj;
      bit vert = (mode >= 18);
      // main reference side (p[-1+k][-1] for vertical, p[-1][-1+k] horizontal)
      for (int k = 0; k <= 2 * n; k++) refa[k] = vert ? int'(top[k]) : int'(left[k]);
      if (a < 0) begin
        inv = (a == -2) ? -4096 : (a == -5) ? -1638 : (a == -9) ? -910 : (a == -13) ? -630 :
              (a == -17) ? -482 : (a == -21) ? -390 : (a == -26) ? -315 : -256;
        if (((n * a) >>> 5) < -1)
          for (int k = (n * a) >>> 5; k <= -1; k++) begin
            int j = (k * inv + 128) >>> 8;
            refa[k] = vert ? int'(left[j]) : int'(top[j]);
          end
      end
      ii = vert ? x : y;
      jj = vert ? y : x;
      idx  = ((jj + 1) * a) >>> 5;
      fact = ((jj + 1) * a) & 31;
      if (fact == 0) return refa[ii + idx + 1];
      return ((32 - fact) * refa[ii + idx + 1] + fact * refa[ii + idx + 2] + 16) >> 5;
    end
  endfunction

  // Closest angular mode to the direction perpendicular to (gx, gy):
  // minimise |32*num/den - angle|, ties to the smaller |angle|.
  function automatic int closest_mode_ref(int gx, int gy);
    int ax = gx < 0 ? -gx : gx, ay = gy < 0 ? -gy : gy;
    bit vert = ax > ay;
    int num = vert ? ay : ax, den = vert ? ax : ay;
    int angs [9] = '{0, 2, 5, 9, 13, 17, 21, 26, 32};
    int best = 0;
    longint bd = -1;
    bit neg;
    for (int k = 0; k < 9; k++) begin
      longint d = 32 * longint'(num) - longint'(angs[k]) * den;
      if (d < 0) d = -d;
      if (bd < 0 || d < bd) begin bd = d; best = k; end
    end
    neg = ((gx < 0) != (gy < 0)) && num != 0;
    if (vert) return neg ? 26 - best : 26 + best;
    return neg ? 10 + best : 10 - best;
  endfunction

endpackage
