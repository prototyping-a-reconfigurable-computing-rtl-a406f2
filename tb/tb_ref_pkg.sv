// Reference arithmetic for the testbenches: the four image filters written
// directly from their formulas, and the window of a pixel with edge
// replication, independent of the RTL's structure.
package tb_ref_pkg;

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // p[1..9] of the window around (r, c) of a w x h image stored row-major.
  function automatic void window_of(const ref int img[], input int w, input int h,
                                    input int r, input int c, output int p[1:9]);
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        p[(dr + 1) * 3 + (dc + 1) + 1] = img[clampi(r + dr, 0, h - 1) * w + clampi(c + dc, 0, w - 1)];
  endfunction

  // mode: 0 edge, 1 expansion, 2 erosion, 3 negative
  function automatic int filter(int mode, int p[1:9]);
    int gx, gy, s;
    case (mode)
      0: begin
        gx = (p[7] + 2*p[8] + p[9]) - (p[1] + 2*p[2] + p[3]);
        gy = (p[3] + 2*p[6] + p[9]) - (p[1] + 2*p[4] + p[7]);
        return clampi(gx + gy, 0, 255);
      end
      1: begin
        s = p[1] + p[2] + p[3] + p[4] + p[6] + p[7] + p[8] + p[9];
        return (s >= 256) ? 255 : s;
      end
      2: return p[1] & p[2] & p[3] & p[4] & p[5] & p[6] & p[7] & p[8] & p[9];
      default: return 255 - p[5];
    endcase
  endfunction

endpackage
