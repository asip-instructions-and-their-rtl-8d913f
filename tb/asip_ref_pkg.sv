// asip_ref_pkg: reference arithmetic for the testbenches, written from the
// definitions rather than from the RTL structure.
//   ftran: X = C x with C = [1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1]
//   itran: the H.264 inverse 4-point transform with its halving of X1 and X3
//   hadd:  min(255, sum of the selected lanes, doubled where mask2 is set)
// Lane values are taken modulo 2^w; transform lanes are two's complement.
package asip_ref_pkg;

  function automatic int sext(int v, int w);
    int m = v & ((1 << w) - 1);
    return (m >= (1 << (w - 1))) ? m - (1 << w) : m;
  endfunction

  function automatic int wrap(int v, int w);
    return v & ((1 << w) - 1);
  endfunction

  // x[k] are raw lane values; returns wrapped result lane k
  function automatic int ftran(int x0, int x1, int x2, int x3, int k, int w);
    int c[4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
    int x[4];
    int s = 0;
    x = '{sext(x0, w), sext(x1, w), sext(x2, w), sext(x3, w)};
    for (int j = 0; j < 4; j++) s += c[k][j] * x[j];
    return wrap(s, w);
  endfunction

  function automatic int itran(int y0, int y1, int y2, int y3, int k, int w);
    int X[4];
    int e0, e1, e2, e3, r;
    X = '{sext(y0, w), sext(y1, w), sext(y2, w), sext(y3, w)};
    e0 = X[0] + X[2];
    e1 = X[0] - X[2];
    e2 = (X[1] >>> 1) - X[3];
    e3 = X[1] + (X[3] >>> 1);
    case (k)
      0: r = e0 + e3;
      1: r = e1 + e2;
      2: r = e1 - e2;
      default: r = e0 - e3;
    endcase
    return wrap(r, w);
  endfunction

  // a[k] unsigned lane values, m1/m2 with bit 3 = lane 0
  function automatic int hadd(int a0, int a1, int a2, int a3, logic [3:0] m1, logic [3:0] m2);
    int a[4];
    int s = 0;
    a = '{a0, a1, a2, a3};
    for (int k = 0; k < 4; k++)
      if (m1[3-k]) s += m2[3-k] ? 2 * a[k] : a[k];
    return (s > 255) ? 255 : s;
  endfunction

endpackage
