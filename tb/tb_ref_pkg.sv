// tb_ref_pkg: reference model used by the testbenches of the filter bank.
//
// The masks are written out as coefficient tables (the low-pass rows
// [1 1], [1 2 1], [1 3 3 1], [1 4 6 4 1], [1 6 15 20 15 6 1]; the high-pass
// row is the same with odd taps negated) and applied with ordinary
// multiplication, so the reference shares nothing with the shift-and-add
// trees of the RTL. Each 1-D result is divided by 2^(L-1) rounding towards
// minus infinity, as the RTL does. Also holds the synthetic test image.
package tb_ref_pkg;

  localparam int MAXL = 7;

  function automatic int coef(int l, int k, bit hp);
    int c;
    case (l)
      2: c = 1;
      3: c = (k == 1) ? 2 : 1;
      4: c = (k == 1 || k == 2) ? 3 : 1;
      5: case (k) 1, 3: c = 4; 2: c = 6; default: c = 1; endcase
      7: case (k) 1, 5: c = 6; 2, 4: c = 15; 3: c = 20; default: c = 1; endcase
      default: c = 0;
    endcase
    if (hp && (k % 2 == 1)) c = -c;
    return c;
  endfunction

  // floor division by 2^s
  function automatic int fdiv(int v, int s);
    return v >>> s;
  endfunction

  function automatic int ref1d(int l, int x[MAXL], bit hp);
    int acc = 0;
    for (int k = 0; k < l; k++) acc += coef(l, k, hp) * x[k];
    return fdiv(acc, l - 1);
  endfunction

  function automatic int ref2d(int l, int w[MAXL][MAXL], bit bh, bit bv);
    int col[MAXL];
    for (int r = 0; r < MAXL; r++) col[r] = 0;
    for (int r = 0; r < l; r++) col[r] = ref1d(l, w[r], bh);
    return ref1d(l, col, bv);
  endfunction

  // Synthetic road scene, 8-bit grey: a sky-to-road brightness gradient,
  // two bright lane markings converging towards the top, a dashed centre
  // line and a little pseudo-random texture.
  function automatic int road_pixel(int x, int y, int w, int h);
    int v, cx, half, lx, rx, nz;
    v  = 60 + (y * 80) / h;
    cx = w / 2;
    half = 4 + (y * (w / 2 - 6)) / h;
    lx = cx - half;
    rx = cx + half;
    if (y > h / 3) begin
      if (x >= lx - 1 && x <= lx + 1) v = 230;
      if (x >= rx - 1 && x <= rx + 1) v = 230;
      if (x == cx && ((y / 4) % 2 == 0)) v = 200;
    end
    nz = ((x * 1103 + y * 4657 + x * y * 31) % 17) - 8;
    v += nz;
    if (v < 0) v = 0;
    if (v > 255) v = 255;
    return v;
  endfunction

endpackage
