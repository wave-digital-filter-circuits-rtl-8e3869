// wdf_ref_pkg: reference model of the wave-digital light-field filters for the testbenches.
//
// Written from the adapter equations, not from the RTL: integers instead of packed types,
// and the multidimensional delays taken by indexing the light field by its coordinates
// (sample n - e_k along dimension k) rather than through delay lines. Fixed-point rules
// are those of the design: waves saturate to 15-bit Q2.13, products of a Q2.11 multiplier
// and a wave sum are floored to 13 fraction bits.
package wdf_ref_pkg;

  function automatic int rsat(longint v);
    if (v > 16383) return 16383;
    if (v < -16384) return -16384;
    return int'(v);
  endfunction

  function automatic longint rmul(int g, longint a);
    longint p;
    p = longint'(g) * a;
    return (p < 0) ? -((-p) >>> 11) : (p >>> 11);
  endfunction

  // Reflection-free series adapter, multiplier on port 1, port 3 matched.
  task automatic ref_rf(input int g, input int a1, a2, a3, output int b1, b2, b3);
    longint s, w1, w3;
    s  = longint'(a1) + longint'(a2) + longint'(a3);
    w1 = a1 - rmul(g, s);
    w3 = -(longint'(a1) + longint'(a2));
    b1 = rsat(w1);
    b3 = rsat(w3);
    b2 = rsat(-(s + w1 + w3));
  endtask

  // Unconstrained series adapter, multipliers on ports 1 and 3.
  task automatic ref_un(input int g1, g3, input int a1, a2, a3, output int b1, b2, b3);
    longint s, w1, w3;
    s  = longint'(a1) + longint'(a2) + longint'(a3);
    w1 = a1 - rmul(g1, s);
    w3 = a3 - rmul(g3, s);
    b1 = rsat(w1);
    b3 = rsat(w3);
    b2 = rsat(-(s + w1 + w3));
  endtask

  // Coordinates of raster index k (n_s fastest); lf is the light-field number.
  typedef struct {int s; int t; int u; int v; int lf;} coord_t;

  function automatic coord_t coord(int k, int ns, int nt, int nu, int nv);
    coord_t c;
    c.s  = k % ns;
    c.t  = (k / ns) % nt;
    c.u  = (k / (ns * nt)) % nu;
    c.v  = (k / (ns * nt * nu)) % nv;
    c.lf = k / (ns * nt * nu * nv);
    return c;
  endfunction

  // One 4-D non-separable hyperplanar section over a stream of light fields.
  // g = {g1, g2, g3, g4, g5}. v continues across light fields.
  task automatic ref_ns(input int g[5], input int ns, nt, nu, nv,
                        const ref int x[], ref int y[]);
    int n;
    int bs[], bt[], bu[], bv[];
    n = x.size();
    bs = new[n]; bt = new[n]; bu = new[n]; bv = new[n];
    y = new[n];
    for (int k = 0; k < n; k++) begin
      coord_t c;
      int als, alt, alu, alv;
      int f12, f23, f43, r21, r32, r34, src, yy, d;
      c   = coord(k, ns, nt, nu, nv);
      als = (c.s > 0) ? rsat(-longint'(bs[k - 1])) : 0;
      alt = (c.t > 0) ? rsat(-longint'(bt[k - ns])) : 0;
      alu = (c.u > 0) ? rsat(-longint'(bu[k - ns * nt])) : 0;
      alv = (c.v > 0 || c.lf > 0) ? rsat(-longint'(bv[k - ns * nt * nu])) : 0;
      // forward waves from the matched ports (do not depend on a3)
      f12 = rsat(-(longint'(x[k]) + als));
      f23 = rsat(-(longint'(f12) + alt));
      f43 = rsat(-(longint'(0) + alv));
      ref_un(g[2], g[3], f23, alu, f43, r32, bu[k], r34);
      ref_rf(g[4], 0, alv, r34, yy, bv[k], d);
      ref_rf(g[1], f12, alt, r32, r21, bt[k], d);
      ref_rf(g[0], x[k], als, r21, src, bs[k], d);
      y[k] = yy;
    end
  endtask

  // One 2-D section over dims (s,u) when tv = 0 or (t,v) when tv = 1.
  // g = {g_src, g_in, g_load}.
  task automatic ref_2d(input int g[3], input int tv, input int ns, nt, nu, nv,
                        const ref int x[], ref int y[]);
    int n;
    int b1[], b2[];
    n = x.size();
    b1 = new[n]; b2 = new[n];
    y = new[n];
    for (int k = 0; k < n; k++) begin
      coord_t c;
      int a1, a2, fwd, back, src, d;
      c = coord(k, ns, nt, nu, nv);
      if (tv == 0) begin
        a1 = (c.s > 0) ? rsat(-longint'(b1[k - 1])) : 0;
        a2 = (c.u > 0) ? rsat(-longint'(b2[k - ns * nt])) : 0;
      end else begin
        a1 = (c.t > 0) ? rsat(-longint'(b1[k - ns])) : 0;
        a2 = (c.v > 0 || c.lf > 0) ? rsat(-longint'(b2[k - ns * nt * nu])) : 0;
      end
      fwd = rsat(-(longint'(x[k]) + a1));
      ref_un(g[1], g[2], fwd, a2, 0, back, b2[k], y[k]);
      ref_rf(g[0], x[k], a1, back, src, b1[k], d);
    end
  endtask

  // Unquantized (floating-point) versions of the two sections, for accuracy checks
  // against the fixed-point design. Same recursions, real arithmetic, no saturation.
  task automatic real_rf(input real g, input real a1, a2, a3, output real b1, b2, b3);
    real s;
    s  = a1 + a2 + a3;
    b1 = a1 - g * s;
    b3 = -(a1 + a2);
    b2 = -(s + b1 + b3);
  endtask

  task automatic real_un(input real g1, g3, input real a1, a2, a3, output real b1, b2, b3);
    real s;
    s  = a1 + a2 + a3;
    b1 = a1 - g1 * s;
    b3 = a3 - g3 * s;
    b2 = -(s + b1 + b3);
  endtask

  task automatic real_ns(input real g[5], input int ns, nt, nu, nv,
                         const ref real x[], ref real y[]);
    int n;
    real bs[], bt[], bu[], bv[];
    n = x.size();
    bs = new[n]; bt = new[n]; bu = new[n]; bv = new[n];
    y = new[n];
    for (int k = 0; k < n; k++) begin
      coord_t c;
      real als, alt, alu, alv, f12, f23, f43, r21, r32, r34, src, d;
      c   = coord(k, ns, nt, nu, nv);
      als = (c.s > 0) ? -bs[k - 1] : 0.0;
      alt = (c.t > 0) ? -bt[k - ns] : 0.0;
      alu = (c.u > 0) ? -bu[k - ns * nt] : 0.0;
      alv = (c.v > 0 || c.lf > 0) ? -bv[k - ns * nt * nu] : 0.0;
      f12 = -(x[k] + als);
      f23 = -(f12 + alt);
      f43 = -alv;
      real_un(g[2], g[3], f23, alu, f43, r32, bu[k], r34);
      real_rf(g[4], 0.0, alv, r34, y[k], bv[k], d);
      real_rf(g[1], f12, alt, r32, r21, bt[k], d);
      real_rf(g[0], x[k], als, r21, src, bs[k], d);
    end
  endtask

  task automatic real_2d(input real g[3], input int tv, input int ns, nt, nu, nv,
                         const ref real x[], ref real y[]);
    int n;
    real b1[], b2[];
    n = x.size();
    b1 = new[n]; b2 = new[n];
    y = new[n];
    for (int k = 0; k < n; k++) begin
      coord_t c;
      real a1, a2, fwd, back, src, d;
      c = coord(k, ns, nt, nu, nv);
      if (tv == 0) begin
        a1 = (c.s > 0) ? -b1[k - 1] : 0.0;
        a2 = (c.u > 0) ? -b2[k - ns * nt] : 0.0;
      end else begin
        a1 = (c.t > 0) ? -b1[k - ns] : 0.0;
        a2 = (c.v > 0 || c.lf > 0) ? -b2[k - ns * nt * nu] : 0.0;
      end
      fwd = -(x[k] + a1);
      real_un(g[1], g[2], fwd, a2, 0.0, back, b2[k], y[k]);
      real_rf(g[0], x[k], a1, back, src, b1[k], d);
    end
  endtask

endpackage
