// tb_ref_pkg: software reference of the sliding-windows algorithms, used by
// the testbenches of sw_chip, tab and l1cal_top.  Works on a full map of
// 40 (eta) x 32 (phi) towers, EM and HD; eta beyond the ends reads as zero
// and phi wraps around.  Written independently of the RTL, with plain
// integer arithmetic; sums above 12 bits are saturated the way the
// bit-serial hardware does (4095).
package tb_ref_pkg;
  typedef int tmap_t [40][32];

  function automatic int tw(const ref tmap_t em, const ref tmap_t hd, input int kind, input int e, input int p);
    int pp;
    if (e < 0 || e >= 40) return 0;
    pp = ((p % 32) + 32) % 32;
    case (kind)
      0: return em[e][pp] + hd[e][pp];
      1: return em[e][pp];
      default: return hd[e][pp];
    endcase
  endfunction

  // sum over an n x n block with lower-left tower (e, p)
  function automatic int blk(const ref tmap_t em, const ref tmap_t hd, input int kind, input int e, input int p, input int n);
    int s = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        s += tw(em, hd, kind, e + i, p + j);
    return s;
  endfunction

  function automatic int sat(input int v);
    return (v > 4095) ? 4095 : v;
  endfunction

  // local maximum of the 2x2 window with lower-left tower (e, p):
  // strictly above windows up and to the right, at least equal to windows
  // down and to the left (rows drawn top = +2 in phi, columns left = -2 in eta)
  function automatic bit locmax(const ref tmap_t em, const ref tmap_t hd, input int kind, input int e, input int p);
    int c, n;
    bit strict;
    c = blk(em, hd, kind, e, p, 2);
    for (int dy = 2; dy >= -2; dy--) begin
      for (int dx = -2; dx <= 2; dx++) begin
        if (dx == 0 && dy == 0) continue;
        if (dy >= 1)      strict = (dx != -2);
        else if (dy == 0) strict = (dx > 0);
        else              strict = (dx == 2);
        n = blk(em, hd, kind, e + dx, p + dy, 2);
        if (strict ? !(c > n) : !(c >= n)) return 0;
      end
    end
    return 1;
  endfunction

  typedef struct {
    bit jet; int jet_et; bit tau; bit em; int em_et;
  } ref_win_t;

  function automatic ref_win_t window(const ref tmap_t em, const ref tmap_t hd, input int e, input int p,
                                      input int iso, input int had, input int ratio);
    ref_win_t r;
    int w2t, w4t, w2e, w4e, w2h;
    w2t = sat(blk(em, hd, 0, e, p, 2));
    w4t = sat(blk(em, hd, 0, e - 1, p - 1, 4));
    w2e = sat(blk(em, hd, 1, e, p, 2));
    w4e = sat(blk(em, hd, 1, e - 1, p - 1, 4));
    w2h = sat(blk(em, hd, 2, e, p, 2));
    r.jet    = locmax(em, hd, 0, e, p);
    r.jet_et = w4t;
    r.tau    = r.jet && (16 * w2t >= ratio * w4t);
    r.em     = locmax(em, hd, 1, e, p) && (w4e - w2e <= iso) && (w2h <= had);
    r.em_et  = w2e;
    return r;
  endfunction

  // Q7 phi weights from the angle of the bin centre
  function automatic int cosw(input int p);
    return int'($floor(128.0 * $cos(2.0 * 3.14159265358979 * (real'(p) + 0.5) / 32.0) + 0.5));
  endfunction
  function automatic int sinw(input int p);
    return int'($floor(128.0 * $sin(2.0 * 3.14159265358979 * (real'(p) + 0.5) / 32.0) + 0.5));
  endfunction
endpackage
