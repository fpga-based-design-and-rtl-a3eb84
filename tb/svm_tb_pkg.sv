// svm_tb_pkg: floating-point reference model of three-level space vector
// geometry, used by the testbenches to work out expected values
// independently of the fixed-point hardware. Voltages are fractions of vdc.
package svm_tb_pkg;

  localparam real PI = 3.14159265358979323846;

  // Fixed-point word (14 fraction bits) <-> real.
  function automatic real q2r(logic signed [17:0] x);
    return real'(x) / 16384.0;
  endfunction

  function automatic logic signed [17:0] r2q(real x);
    return 18'(int'($floor(x * 16384.0 + 0.5)));
  endfunction

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // Angle of a vector in degrees, 0 .. 360.
  function automatic real angle_deg(real a, real b);
    real d;
    d = $atan2(b, a) * 180.0 / PI;
    if (d < 0.0) d = d + 360.0;
    return d;
  endfunction

  function automatic int sector_of(real a, real b);
    int s;
    s = int'($floor(angle_deg(a, b) / 60.0)) + 1;
    return (s > 6) ? 6 : s;
  endfunction

  // Coordinates of a vector in the 60-degree frame of a sector, in units of
  // the small-vector length sqrt(1/6)*vdc.
  function automatic void to_gh(real a, real b, int sector, output real g, output real h);
    real phi, ar, br;
    phi = (sector - 1) * PI / 3.0;
    ar =  $cos(phi) * a + $sin(phi) * b;
    br = -$sin(phi) * a + $cos(phi) * b;
    g = $sqrt(6.0) * ar - $sqrt(2.0) * br;
    h = 2.0 * $sqrt(2.0) * br;
  endfunction

  // Inverse of to_gh.
  function automatic void from_gh(real g, real h, int sector, output real a, output real b);
    real phi, ar, br;
    br = h / (2.0 * $sqrt(2.0));
    ar = (g + $sqrt(2.0) * br) / $sqrt(6.0);
    phi = (sector - 1) * PI / 3.0;
    a = $cos(phi) * ar - $sin(phi) * br;
    b = $sin(phi) * ar + $cos(phi) * br;
  endfunction

  function automatic int triangle_of(real g, real h);
    if (g + h < 1.0) return 1;
    if (g >= 1.0)    return 2;
    if (h >= 1.0)    return 4;
    return 3;
  endfunction

  // Distance of (g, h) from the nearest triangle or sector boundary.
  function automatic real margin(real g, real h);
    real m;
    m = (g + h - 1.0 < 0.0) ? 1.0 - g - h : g + h - 1.0;
    if (fabs(g - 1.0) < m) m = fabs(g - 1.0);
    if (fabs(h - 1.0) < m) m = fabs(h - 1.0);
    if (fabs(g) < m) m = fabs(g);
    if (fabs(h) < m) m = fabs(h);
    return m;
  endfunction

  // Alpha-beta position of a switching state (levels 0, 1, 2 per phase).
  function automatic void state_ab(int la, int lb, int lc, output real a, output real b);
    a = $sqrt(2.0 / 3.0) * 0.5 * (la - 0.5 * (lb + lc));
    b = (1.0 / $sqrt(2.0)) * 0.5 * (lb - lc);
  endfunction

  // Dwell fractions of the three corners (units of Ts).
  function automatic void dwell(int tr, real g, real h, output real f1, output real f2, output real f3);
    case (tr)
      1: begin f1 = 1.0 - g - h; f2 = g;       f3 = h;           end
      2: begin f1 = 2.0 - g - h; f2 = g - 1.0; f3 = h;           end
      3: begin f1 = 1.0 - h;     f2 = 1.0 - g; f3 = g + h - 1.0; end
      default: begin f1 = 2.0 - g - h; f2 = g; f3 = h - 1.0;     end
    endcase
  endfunction

  // Sector-1 frame (g, h) of the corners of each triangle, in the order of
  // the dwell fractions above.
  function automatic void corner(int tr, int k, output real g, output real h);
    int gg[4][3] = '{'{0, 1, 0}, '{1, 2, 1}, '{1, 0, 1}, '{0, 1, 0}};
    int hh[4][3] = '{'{0, 0, 1}, '{0, 0, 1}, '{0, 1, 1}, '{1, 1, 2}};
    g = gg[tr-1][k];
    h = hh[tr-1][k];
  endfunction

  // A random point strictly inside the hexagon, away from boundaries.
  function automatic void random_point(real max_mag, output real a, output real b);
    real m, th;
    m  = max_mag * ($urandom_range(0, 100000) / 100000.0);
    th = 2.0 * PI * ($urandom_range(0, 1000000) / 1000000.0);
    a = m * $cos(th);
    b = m * $sin(th);
  endfunction

endpackage
