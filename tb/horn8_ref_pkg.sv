// horn8_ref_pkg: reference arithmetic for the HORN-8 testbenches.
//
// Computes what each pixel unit must produce straight from the closed form,
// without the difference recursion of the pipeline:
//   Theta_1 = bits 31..11 of (dX^2 + dY^2) * Delta          (mod 2^32)
//   Gamma_1 = bits 31..11 of (2*dX + 1) * Delta              (mod 2^32)
//   D2      = bits 30..10 of Delta                           (2*Delta)
//   Theta_k = Theta_1 + (k-1)*Gamma_1 + (k-1)(k-2)/2 * D2    (mod 2^21)
// the triangle cosine 31 - 2*min(t, 63 - t) of the top six phase bits, and
// the 18-bit wrapping sum whose MSB is the pixel.
package horn8_ref_pkg;
  import horn8_pkg::*;

  function automatic int ref_cos(input logic [5:0] t);
    int m;
    m = (int'(t) < 63 - int'(t)) ? int'(t) : 63 - int'(t);
    return 31 - 2 * m;
  endfunction

  // phase of unit k (k = 0 is the BPU) for segment start (xa, ya)
  function automatic logic [20:0] ref_theta(input logic [13:0] xa, input logic [13:0] ya,
                                            input obj_point_t p, input int k);
    longint dx, dy, r2, g, t1, g1, d2, kk;
    dx = longint'($signed(14'(xa - p.x)));
    dy = longint'($signed(14'(ya - p.y)));
    r2 = dx * dx + dy * dy;
    g  = 2 * dx + 1;
    t1 = ((r2 * longint'(p.delta)) & 64'hFFFF_FFFF) >> 11;
    g1 = ((g  * longint'(p.delta)) & 64'hFFFF_FFFF) >> 11;
    d2 = (longint'(p.delta) >> 10) & 64'h1F_FFFF;
    kk = longint'(k);
    return 21'(t1 + kk * g1 + (kk * (kk - 1) / 2) * d2);
  endfunction

  function automatic logic [20:0] ref_gamma(input logic [13:0] xa, input obj_point_t p);
    longint dx;
    dx = longint'($signed(14'(xa - p.x)));
    return 21'((((2 * dx + 1) * longint'(p.delta)) & 64'hFFFF_FFFF) >> 11);
  endfunction

  // final 18-bit sum of unit k over points[0 .. n-1]
  function automatic logic [17:0] ref_sum(input logic [13:0] xa, input logic [13:0] ya,
                                          input int k, input obj_point_t pts[$]);
    logic [17:0] s;
    logic [20:0] th;
    s = '0;
    foreach (pts[i]) begin
      th = ref_theta(xa, ya, pts[i], k);
      s  = s + 18'(ref_cos(th[20:15]));
    end
    return s;
  endfunction

  function automatic logic ref_pixel(input logic [13:0] xa, input logic [13:0] ya,
                                     input int k, input obj_point_t pts[$]);
    logic [17:0] s;
    s = ref_sum(xa, ya, k, pts);
    return s[17];
  endfunction

  // a random object point; Delta kept in a physically sensible range
  // (p = 1..8 um, lambda = 0.5 um, Z = 0.05..1 m gives Delta ~ 1e-6 .. 1.6e-4)
  function automatic obj_point_t rand_point(input int xmax, input int ymax);
    obj_point_t p;
    p.x     = 14'($urandom_range(xmax));
    p.y     = 14'($urandom_range(ymax));
    p.delta = 32'($urandom_range(32'd700_000, 32'd4_000));
    return p;
  endfunction

endpackage
