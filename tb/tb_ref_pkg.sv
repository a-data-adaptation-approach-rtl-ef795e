// tb_ref_pkg: reference model of the triangle fill used by the testbenches.
// It computes, with direct multiplication rather than the hardware's running
// sums, the segments of a Gouraud-shaded triangle and the pixels of each
// segment, in the same Q16.16 fixed point (truncating division, rounding to
// the nearest integer with halves up). Also the vertex / pixel word packing.
package tb_ref_pkg;

  typedef struct {
    int y, xl, xr, cl, cr;
    bit last;
  } ref_line_t;

  function automatic longint tdiv(input longint n, input longint d);
    if (d == 0) return 0;
    return n / d;   // truncates toward zero
  endfunction

  function automatic int rnd(input longint v);
    return int'((v + 32768) >>> 16);
  endfunction

  function automatic logic [31:0] vword(input int x, input int y, input int c);
    return {x[11:0], y[11:0], c[7:0]};
  endfunction

  // segments of the triangle, top to bottom
  function automatic void tri_lines(input int x[3], input int y[3], input int c[3],
                                    ref ref_line_t q[$]);
    int o[3] = '{0, 1, 2};
    int ax, ay, ac, bx, by, bc, cx, cy, cc;
    longint dxac, dxab, dxbc, dcac, dcab, dcbc;
    // stable insertion sort by y
    for (int i = 1; i < 3; i++)
      for (int j = i; j > 0 && y[o[j]] < y[o[j-1]]; j--) begin
        int t = o[j]; o[j] = o[j-1]; o[j-1] = t;
      end
    ax = x[o[0]]; ay = y[o[0]]; ac = c[o[0]];
    bx = x[o[1]]; by = y[o[1]]; bc = c[o[1]];
    cx = x[o[2]]; cy = y[o[2]]; cc = c[o[2]];
    dxac = tdiv(longint'(cx - ax) * 65536, cy - ay);
    dxab = tdiv(longint'(bx - ax) * 65536, by - ay);
    dxbc = tdiv(longint'(cx - bx) * 65536, cy - by);
    dcac = tdiv(longint'(cc - ac) * 65536, cy - ay);
    dcab = tdiv(longint'(bc - ac) * 65536, by - ay);
    dcbc = tdiv(longint'(cc - bc) * 65536, cy - by);
    for (int yy = ay; yy <= cy; yy++) begin
      int x1, c1, x2, c2;
      ref_line_t l;
      x1 = rnd(longint'(ax) * 65536 + dxac * (yy - ay));
      c1 = rnd(longint'(ac) * 65536 + dcac * (yy - ay));
      if (yy < by) begin
        x2 = rnd(longint'(ax) * 65536 + dxab * (yy - ay));
        c2 = rnd(longint'(ac) * 65536 + dcab * (yy - ay));
      end else begin
        x2 = rnd(longint'(bx) * 65536 + dxbc * (yy - by));
        c2 = rnd(longint'(bc) * 65536 + dcbc * (yy - by));
      end
      l.y = yy;
      l.last = (yy == cy);
      if (x2 < x1) begin
        l.xl = x2; l.cl = c2; l.xr = x1; l.cr = c1;
      end else begin
        l.xl = x1; l.cl = c1; l.xr = x2; l.cr = c2;
      end
      q.push_back(l);
    end
  endfunction

  // pixels of one segment as {last, y, x, c}
  function automatic void line_pixels(input ref_line_t l, ref logic [32:0] q[$]);
    longint inc;
    inc = tdiv(longint'(l.cr - l.cl) * 65536, l.xr - l.xl);
    for (int xx = l.xl; xx <= l.xr; xx++) begin
      int cc;
      cc = rnd(longint'(l.cl) * 65536 + inc * (xx - l.xl));
      q.push_back({l.last && (xx == l.xr), 12'(l.y), 12'(xx), 8'(cc)});
    end
  endfunction

  // all pixels of a triangle
  function automatic void tri_pixels(input int x[3], input int y[3], input int c[3],
                                     ref logic [32:0] q[$]);
    ref_line_t ls[$];
    tri_lines(x, y, c, ls);
    foreach (ls[i]) line_pixels(ls[i], q);
  endfunction

endpackage
