// br3d_ref_pkg: reference model for the testbenches.
//
// bresenham3d() is the textbook 3D Bresenham line walk written in the
// usual permuted form: pick the driving axis, keep two error terms for the
// other two axes, and step until the driving coordinate reaches the end.
// It returns every point, start and end included, packed like the hardware
// words (x 9:0, y 19:10, z 29:20). It shares no code with the RTL.
package br3d_ref_pkg;

  typedef int unsigned word_q[$];

  function automatic int unsigned pack_pt(int x, int y, int z);
    return (int'(z) << 20) | (int'(y) << 10) | int'(x);
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic int isign(int v);
    return (v > 0) ? 1 : ((v < 0) ? -1 : 0);
  endfunction

  function automatic word_q bresenham3d(int x1, int y1, int z1,
                                        int x2, int y2, int z2);
    word_q q;
    int c[3], e[3], a[3], s[3];
    int drv, o1, o2, p1, p2;
    c[0] = x1; c[1] = y1; c[2] = z1;
    e[0] = x2; e[1] = y2; e[2] = z2;
    for (int k = 0; k < 3; k++) begin
      a[k] = iabs(e[k] - c[k]);
      s[k] = isign(e[k] - c[k]);
    end
    if (a[0] >= a[1] && a[0] >= a[2]) drv = 0;
    else if (a[1] >= a[2])            drv = 1;
    else                              drv = 2;
    o1 = (drv + 1) % 3;
    o2 = (drv + 2) % 3;
    p1 = 2 * a[o1] - a[drv];
    p2 = 2 * a[o2] - a[drv];
    q.push_back(pack_pt(c[0], c[1], c[2]));
    while (c[drv] != e[drv]) begin
      c[drv] += s[drv];
      if (p1 >= 0) begin c[o1] += s[o1]; p1 -= 2 * a[drv]; end
      if (p2 >= 0) begin c[o2] += s[o2]; p2 -= 2 * a[drv]; end
      p1 += 2 * a[o1];
      p2 += 2 * a[o2];
      q.push_back(pack_pt(c[0], c[1], c[2]));
    end
    return q;
  endfunction

  // Driving axis (0 x, 1 y, 2 z) with ties to x, then y.
  function automatic int drive_axis(int dx, int dy, int dz);
    int ax = iabs(dx), ay = iabs(dy), az = iabs(dz);
    if (ax >= ay && ax >= az) return 0;
    if (ay >= az) return 1;
    return 2;
  endfunction

endpackage
