// tdcnn_ref_pkg: reference arithmetic for the time-domain CNN testbenches.
//
// Worked out from the design's definition rather than from its RTL:
//  - a pixel X encodes X >> s quanta of EN-high time, s = 0, 2, 3, 4 for the
//    1x, 4x, 8x and 16x modes;
//  - an MDL loop of L stages (len units plus enabled calibration stages) with
//    node E after unit len counts one turn each time the net signed step count
//    V passes len (mod 2L) upwards, so count = floor((V + 2L - len) / 2L);
//  - the counter wraps at CNT_W bits.
package tdcnn_ref_pkg;

  function automatic int shift_of(int mode);
    case (mode)
      0: return 0;
      1: return 2;
      2: return 3;
      default: return 4;
    endcase
  endfunction

  function automatic int floor_div(int a, int b);
    int q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  function automatic int mdl_count(int v, int len, int ncal);
    int l2;
    l2 = 2 * (len + ncal);
    return floor_div(v + l2 - len, l2);
  endfunction

  // Sign-extend the low w bits of x.
  function automatic int wrap(int x, int w);
    int m;
    m = x & ((1 << w) - 1);
    if (m >= (1 << (w - 1))) m = m - (1 << w);
    return m;
  endfunction

  // Expected state vector (len active units) for net phase v, with ncal
  // calibration stages after the units: a twisted ring of L = len + ncal
  // stages, all zero at v = 0, filling with ones from unit 0.
  function automatic int unsigned ring_units(int v, int len, int ncal);
    int L, p;
    int unsigned r;
    L = len + ncal;
    p = v % (2 * L);
    if (p < 0) p += 2 * L;
    r = 0;
    for (int i = 0; i < len; i++) begin
      if (p <= L) r[i] = (i < p);
      else        r[i] = !(i < p - L);
    end
    return r;
  endfunction

endpackage
