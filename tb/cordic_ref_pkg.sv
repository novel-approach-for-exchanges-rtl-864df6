// cordic_ref_pkg: floating-point reference of the reconfigurable CORDIC, for
// the testbenches. Converts between reals and the fixed-point words of
// cordic_pkg and gives the exact results of circular/hyperbolic rotation and
// vectoring, computed with the simulator's real math functions, so that no
// checked value comes from the design's own arithmetic.
package cordic_ref_pkg;
  import cordic_pkg::*;

  localparam real PI = 3.14159265358979323846;

  function automatic real io2r(input io_t v);
    return real'(v) / real'(1 << F);
  endfunction

  function automatic real w2r(input word_t v);
    return real'(v) / real'(1 << FI);
  endfunction

  function automatic io_t r2io(input real r);
    real s = r * real'(1 << F);
    s = (s < 0.0) ? s - 0.5 : s + 0.5;
    if (s > 32767.0) s = 32767.0;
    if (s < -32768.0) s = -32768.0;
    return io_t'(longint'($rtoi(s)));
  endfunction

  function automatic word_t r2w(input real r);
    real s = r * real'(1 << FI);
    s = (s < 0.0) ? s - 0.5 : s + 0.5;
    return word_t'(longint'($rtoi(s)));
  endfunction

  function automatic real rnd(input real lo, input real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction

  function automatic real sat_r(input real r);
    real mx = 32767.0 / real'(1 << F);
    if (r > mx) return mx;
    if (r < -4.0) return -4.0;
    return r;
  endfunction

  // Exact rotation of (x, y) by z on the chosen trajectory.
  function automatic void rot_ref(input traj_e t, input real x, input real y, input real z,
                                  output real xo, output real yo);
    if (t == CIRC) begin
      xo = x * $cos(z) - y * $sin(z);
      yo = x * $sin(z) + y * $cos(z);
    end else begin
      xo = x * $cosh(z) + y * $sinh(z);
      yo = y * $cosh(z) + x * $sinh(z);
    end
  endfunction

  // Exact vectoring of (x, y): length and angle.
  function automatic void vec_ref(input traj_e t, input real x, input real y,
                                  output real mo, output real ao);
    if (t == CIRC) begin
      mo = $sqrt(x * x + y * y);
      ao = $atan2(y, x);
    end else begin
      mo = $sqrt(x * x - y * y);
      ao = $atanh(y / x);
    end
  endfunction

  function automatic real fabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // Difference of two angles, folded into (-pi, pi].
  function automatic real ang_diff(input real a, input real b);
    real d = a - b;
    while (d > PI) d = d - 2.0 * PI;
    while (d <= -PI) d = d + 2.0 * PI;
    return d;
  endfunction
endpackage
