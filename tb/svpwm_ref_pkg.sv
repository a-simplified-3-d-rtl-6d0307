// svpwm_ref_pkg: reference model used by the testbenches.  It computes the
// modulator results from the phase voltages directly instead of from the
// sign tables of the design:
//  * bottom vertex: subtract the smallest phase voltage and take the floor
//    of each phase (a vertex with one phase at level 0, nearest the origin);
//  * duty cycles: with remainder phase voltages r (0 <= r < 1),
//      continuous     Dx = rx - (max(r)+min(r))/2 + 1/2   (zero vectors split)
//      discontinuous  Dx = 1 - (max(r) - rx) in the regions whose phase order
//                     is cyclic (a>b>c, b>c>a, c>a>b), Dx = rx - min(r) else.
// Voltages are integers with FRAC fraction bits; duty cycles are returned
// with FRAC+1 fraction bits, the format of the design.
package svpwm_ref_pkg;

  localparam int FRAC = 12;
  localparam int ONE  = 1 << FRAC;

  function automatic int imin3(int a, int b, int c);
    int m; m = a; if (b < m) m = b; if (c < m) m = c; return m;
  endfunction

  function automatic int imax3(int a, int b, int c);
    int m; m = a; if (b > m) m = b; if (c > m) m = c; return m;
  endfunction

  // bottom vertex, saturated at nlev-1
  function automatic void bottom(input int va, vb, vc, input int nlev, output int s[3]);
    int v[3]; int mn;
    v = '{va, vb, vc};
    mn = imin3(va, vb, vc);
    for (int k = 0; k < 3; k++) begin
      s[k] = (v[k] - mn) / ONE;
      if (s[k] > nlev - 1) s[k] = nlev - 1;
    end
  endfunction

  // legal m for a bottom vertex whose largest level is smax
  function automatic int mclamp(int m, int smax, int nlev);
    int room; room = nlev - 2 - smax;
    if (room <= 0) return 0;
    return (m > room) ? room : m;
  endfunction

  // duty cycles (FRAC+1 fraction bits) and region of a reference
  function automatic void duties(input int va, vb, vc, input bit disc,
                                 output int d[3], output int region);
    int v[3]; int r[3]; int mn, rmax, rmin; bit cyc;
    v = '{va, vb, vc};
    mn = imin3(va, vb, vc);
    for (int k = 0; k < 3; k++) r[k] = (v[k] - mn) % ONE;
    rmax = imax3(r[0], r[1], r[2]);
    rmin = imin3(r[0], r[1], r[2]);
    cyc = (r[0] >= r[1] && r[1] >= r[2]) || (r[1] >= r[2] && r[2] >= r[0]) ||
          (r[2] >= r[0] && r[0] >= r[1]);
    for (int k = 0; k < 3; k++) begin
      if (!disc)    d[k] = 2 * r[k] - rmax - rmin + ONE;
      else if (cyc) d[k] = 2 * (ONE - rmax + r[k]);
      else          d[k] = 2 * (r[k] - rmin);
    end
    if      (r[0] >= r[1] && r[1] >= r[2]) region = 1;
    else if (r[1] >= r[0] && r[0] >= r[2]) region = 2;
    else if (r[1] >= r[2] && r[2] >= r[0]) region = 3;
    else if (r[2] >= r[1] && r[1] >= r[0]) region = 4;
    else if (r[2] >= r[0] && r[0] >= r[1]) region = 5;
    else                                   region = 6;
  endfunction

endpackage
