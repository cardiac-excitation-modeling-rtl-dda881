// lr1_ref_pkg - floating-point reference of the Luo-Rudy phase-I cell model
// for the testbenches.  It integrates the same equations as the hardware
// with the same forward-Euler step, in double precision and with the rate
// functions evaluated exactly (no tables), so comparing against it shows the
// combined error of the fixed-point format and the lookup tables.
package lr1_ref_pkg;

  typedef struct {
    real v, m, h, j, d, f, x, ca;
  } ref_state_t;

  typedef struct {
    real ina, isi, ik, ik1, ikp, ib, esi;
  } ref_cur_t;

  function automatic real am(real v);
    if (v > -47.13 - 1e-6 && v < -47.13 + 1e-6) v = v + 2e-6;
    return 0.32 * (v + 47.13) / (1.0 - $exp(-0.1 * (v + 47.13)));
  endfunction
  function automatic real bm(real v); return 0.08 * $exp(-v / 11.0); endfunction
  function automatic real ah(real v);
    return (v >= -40.0) ? 0.0 : 0.135 * $exp((80.0 + v) / -6.8);
  endfunction
  function automatic real bh(real v);
    return (v >= -40.0) ? 1.0 / (0.13 * (1.0 + $exp((v + 10.66) / -11.1)))
                        : 3.56 * $exp(0.079 * v) + 3.1e5 * $exp(0.35 * v);
  endfunction
  function automatic real aj(real v);
    return (v >= -40.0) ? 0.0 : (-1.2714e5 * $exp(0.2444 * v) - 3.474e-5 * $exp(-0.04391 * v))
                                * (v + 37.78) / (1.0 + $exp(0.311 * (v + 79.23)));
  endfunction
  function automatic real bj(real v);
    return (v >= -40.0) ? 0.3 * $exp(-2.535e-7 * v) / (1.0 + $exp(-0.1 * (v + 32.0)))
                        : 0.1212 * $exp(-0.01052 * v) / (1.0 + $exp(-0.1378 * (v + 40.14)));
  endfunction
  function automatic real ad(real v); return 0.095 * $exp(-0.01 * (v - 5.0)) / (1.0 + $exp(-0.072 * (v - 5.0))); endfunction
  function automatic real bd(real v); return 0.07 * $exp(-0.017 * (v + 44.0)) / (1.0 + $exp(0.05 * (v + 44.0))); endfunction
  function automatic real af(real v); return 0.012 * $exp(-0.008 * (v + 28.0)) / (1.0 + $exp(0.15 * (v + 28.0))); endfunction
  function automatic real bf(real v); return 0.0065 * $exp(-0.02 * (v + 30.0)) / (1.0 + $exp(-0.2 * (v + 30.0))); endfunction
  function automatic real ax(real v); return 0.0005 * $exp(0.083 * (v + 50.0)) / (1.0 + $exp(0.057 * (v + 50.0))); endfunction
  function automatic real bx(real v); return 0.0013 * $exp(-0.06 * (v + 20.0)) / (1.0 + $exp(-0.04 * (v + 20.0))); endfunction
  function automatic real xi(real v);
    if (v <= -100.0) return 1.0;
    if (v > -77.0 - 1e-6 && v < -77.0 + 1e-6) v = v + 2e-6;
    return 2.837 * ($exp(0.04 * (v + 77.0)) - 1.0) / ((v + 77.0) * $exp(0.04 * (v + 35.0)));
  endfunction
  function automatic real k1inf(real v);
    real a, b;
    a = 1.02 / (1.0 + $exp(0.2385 * (v + 87.8925 - 59.215)));
    b = (0.49124 * $exp(0.08032 * (v + 87.8925 + 5.476)) + $exp(0.06175 * (v + 87.8925 - 594.31)))
        / (1.0 + $exp(-0.5143 * (v + 87.8925 + 4.753)));
    return a / (a + b);
  endfunction
  function automatic real kp(real v); return 1.0 / (1.0 + $exp((7.488 - v) / 5.98)); endfunction

  function automatic ref_state_t rest(real v0, real ca0);
    ref_state_t s;
    s.v = v0;  s.ca = ca0;
    s.m = am(v0) / (am(v0) + bm(v0));
    s.h = ah(v0) / (ah(v0) + bh(v0));
    s.j = aj(v0) / (aj(v0) + bj(v0));
    s.d = ad(v0) / (ad(v0) + bd(v0));
    s.f = af(v0) / (af(v0) + bf(v0));
    s.x = ax(v0) / (ax(v0) + bx(v0));
    return s;
  endfunction

  function automatic ref_cur_t currents(ref_state_t s);
    ref_cur_t c;
    c.esi = 7.7 - 13.0287 * $ln(s.ca);
    c.ina = 23.0 * s.m * s.m * s.m * s.h * s.j * (s.v - 54.7942);
    c.isi = 0.09 * s.d * s.f * (s.v - c.esi);
    c.ik  = 0.282 * s.x * xi(s.v) * (s.v + 77.5673);
    c.ik1 = 0.6047 * k1inf(s.v) * (s.v + 87.8925);
    c.ikp = 0.0183 * kp(s.v) * (s.v + 87.8925);
    c.ib  = 0.03921 * (s.v + 59.87);
    return c;
  endfunction

  function automatic real gstep(real y, real a, real b, real dt);
    return y + dt * (a * (1.0 - y) - b * y);
  endfunction

  function automatic ref_state_t step(ref_state_t s, real iext, real dt);
    ref_state_t n;
    ref_cur_t   c;
    c = currents(s);
    n.v  = s.v - dt * (iext + c.ina + c.isi + c.ik + c.ik1 + c.ikp + c.ib);
    n.m  = gstep(s.m, am(s.v), bm(s.v), dt);
    n.h  = gstep(s.h, ah(s.v), bh(s.v), dt);
    n.j  = gstep(s.j, aj(s.v), bj(s.v), dt);
    n.d  = gstep(s.d, ad(s.v), bd(s.v), dt);
    n.f  = gstep(s.f, af(s.v), bf(s.v), dt);
    n.x  = gstep(s.x, ax(s.v), bx(s.v), dt);
    n.ca = s.ca + dt * (-1.0e-4 * c.isi + 0.07 * (1.0e-4 - s.ca));
    return n;
  endfunction
endpackage
