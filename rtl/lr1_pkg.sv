// lr1_pkg - types, constants and helpers shared by the Luo-Rudy phase-I solver.
//
// Every datapath signal is a signed fixed-point number with a 36-bit word and
// 22 fraction bits (fixdt(1,36,22)); voltages are in mV, currents in uA/cm^2,
// time in ms and the calcium concentration in uM.  The word and fraction lengths are the
// ones the design is built for.  Multiplications keep the full 72-bit product
// and round it back to 22 fraction bits.
//
// The voltage-dependent rate and rectification functions of the model are
// given here as real-valued functions.  They are evaluated only while the
// lookup-table ROMs are initialised, never in the clocked datapath.  The
// formulas are those of the published Luo-Rudy phase-I model; the
// conductances and reversal potentials are the values used by the design
// (ENa = 54.7942, EK = -77.5673, EK1 = EKp = -87.8925, Eb = -59.87 mV).
//
// The solver step is a fixed schedule of NPH clock phases; the phase numbers
// at which each pipeline stage works are named here so that every block
// agrees on them.
package lr1_pkg;

  localparam int WL = 36;
  localparam int FL = 22;
  typedef logic signed [WL-1:0] fix_t;

  // real <-> fixed conversion (round to nearest)
  function automatic fix_t to_fix(real r);
    return fix_t'(longint'(r * real'(longint'(1) << FL)));
  endfunction

  // as to_fix, but saturating at the ends of the fixed-point range
  function automatic fix_t to_fix_sat(real r);
    real lim = real'(longint'(1) << (WL - 1 - FL));
    if (r >= lim)  return {1'b0, {(WL-1){1'b1}}};
    if (r < -lim)  return {1'b1, {(WL-1){1'b0}}};
    return to_fix(r);
  endfunction

  function automatic real to_real(fix_t f);
    return real'(f) / real'(longint'(1) << FL);
  endfunction

  // fixed * fixed -> fixed, rounded to nearest
  function automatic fix_t fmul(fix_t a, fix_t b);
    logic signed [2*WL-1:0] p;
    p = (2*WL)'(a) * (2*WL)'(b);
    p = p + (2*WL)'(longint'(1) << (FL - 1));
    return fix_t'(p >>> FL);
  endfunction

  // ---------------------------------------------------------------- schedule
  localparam int NPH      = 7;  // clock phases per Euler step
  localparam int PH_LUT   = 0;  // ROM reads addressed by the committed state
  localparam int PH_P1    = 1;  // first product level
  localparam int PH_P2    = 2;
  localparam int PH_P3    = 3;
  localparam int PH_P4    = 4;  // last product level: all currents valid after it
  localparam int PH_SUM   = 5;  // current sum and calcium derivative
  localparam int PH_COMMIT = 6; // all state variables take their new values
  typedef logic [NPH-1:0] phase_t;

  // ---------------------------------------------------------------- constants
  localparam real DT_MS   = 0.005;     // Euler time step, ms
  localparam real CM      = 1.0;       // membrane capacitance, uF/cm^2
  localparam real G_NA    = 23.0;
  localparam real E_NA    = 54.7942;
  localparam real G_SI    = 0.09;
  localparam real G_K     = 0.282;
  localparam real E_K     = -77.5673;
  localparam real G_K1    = 0.6047;
  localparam real E_K1    = -87.8925;
  localparam real G_KP    = 0.0183;
  localparam real E_KP    = -87.8925;
  localparam real G_B     = 0.03921;
  localparam real E_B     = -59.87;
  localparam real ESI_C   = 7.7;       // ESi = ESI_C - ESI_K * ln([Ca]i)
  localparam real ESI_K   = 13.0287;
  // [Ca]i is held in uM (not mM) so that its slow recovery, about 3.5e-7 mM
  // per step, is not lost below the 22-bit fraction:
  //   d[Ca]i/dt = -CA_ISI*Isi + CA_RATE*(CA_REST - [Ca]i)   ([Ca]i in uM)
  // which is 1000 times the model's equation in mM.
  localparam real CA_REST = 0.1;       // 1e-4 mM
  localparam real CA_ISI  = 0.1;       // 1e-4 mM per (uA/cm^2 ms)
  localparam real CA_RATE = 0.07;
  localparam real CA_UM_PER_MM = 1000.0;

  // initial state (resting cell)
  localparam real VM_INIT  = -84.0;
  localparam real CA_INIT  = 0.2;      // uM (2e-4 mM)

  // ---------------------------------------------------------------- voltage LUT geometry
  localparam int  LUT_ABITS = 12;      // 4096 entries
  localparam int  LUT_SHIFT = 4;       // 2^4 entries per mV
  localparam real LUT_VMIN  = -128.0;  // voltage of entry 0

  function automatic real lut_voltage(int idx);
    return LUT_VMIN + real'(idx) / real'(1 << LUT_SHIFT);
  endfunction

  // nearest table entry for a fixed-point voltage, clamped to the table
  function automatic logic [LUT_ABITS-1:0] lut_index(fix_t v);
    logic signed [WL:0] u;
    u = (WL+1)'(v) - (WL+1)'(to_fix(LUT_VMIN)) + (WL+1)'(longint'(1) << (FL - LUT_SHIFT - 1));
    u = u >>> (FL - LUT_SHIFT);
    if (u < 0) return '0;
    if (u > (WL+1)'((1 << LUT_ABITS) - 1)) return '1;
    return LUT_ABITS'(u);
  endfunction

  // ---------------------------------------------------------------- rate functions
  typedef enum logic [3:0] {
    F_AM, F_BM, F_AH, F_BH, F_AJ, F_BJ, F_AD, F_BD, F_AF, F_BF, F_AX, F_BX,
    F_XI, F_K1INF, F_KP
  } rate_fn_e;

  function automatic real rate_value(rate_fn_e fn, real v_in);
    real v, ak1, bk1, dv;
    v = v_in;
    case (fn)
      F_AM: begin
        if (v + 47.13 < 1.0e-6 && v + 47.13 > -1.0e-6) v = -47.13 + 1.0e-6;
        return 0.32 * (v + 47.13) / (1.0 - $exp(-0.1 * (v + 47.13)));
      end
      F_BM: return 0.08 * $exp(-v / 11.0);
      F_AH: return (v >= -40.0) ? 0.0 : 0.135 * $exp((80.0 + v) / -6.8);
      F_BH: return (v >= -40.0) ? 1.0 / (0.13 * (1.0 + $exp((v + 10.66) / -11.1)))
                                : 3.56 * $exp(0.079 * v) + 3.1e5 * $exp(0.35 * v);
      F_AJ: return (v >= -40.0) ? 0.0
                   : (-1.2714e5 * $exp(0.2444 * v) - 3.474e-5 * $exp(-0.04391 * v))
                     * (v + 37.78) / (1.0 + $exp(0.311 * (v + 79.23)));
      F_BJ: return (v >= -40.0) ? 0.3 * $exp(-2.535e-7 * v) / (1.0 + $exp(-0.1 * (v + 32.0)))
                   : 0.1212 * $exp(-0.01052 * v) / (1.0 + $exp(-0.1378 * (v + 40.14)));
      F_AD: return 0.095 * $exp(-0.01 * (v - 5.0)) / (1.0 + $exp(-0.072 * (v - 5.0)));
      F_BD: return 0.07 * $exp(-0.017 * (v + 44.0)) / (1.0 + $exp(0.05 * (v + 44.0)));
      F_AF: return 0.012 * $exp(-0.008 * (v + 28.0)) / (1.0 + $exp(0.15 * (v + 28.0)));
      F_BF: return 0.0065 * $exp(-0.02 * (v + 30.0)) / (1.0 + $exp(-0.2 * (v + 30.0)));
      F_AX: return 0.0005 * $exp(0.083 * (v + 50.0)) / (1.0 + $exp(0.057 * (v + 50.0)));
      F_BX: return 0.0013 * $exp(-0.06 * (v + 20.0)) / (1.0 + $exp(-0.04 * (v + 20.0)));
      F_XI: begin
        if (v <= -100.0) return 1.0;
        if (v + 77.0 < 1.0e-6 && v + 77.0 > -1.0e-6) v = -77.0 + 1.0e-6;
        return 2.837 * ($exp(0.04 * (v + 77.0)) - 1.0) / ((v + 77.0) * $exp(0.04 * (v + 35.0)));
      end
      F_K1INF: begin
        dv  = v - E_K1;
        ak1 = 1.02 / (1.0 + $exp(0.2385 * (dv - 59.215)));
        bk1 = (0.49124 * $exp(0.08032 * (dv + 5.476)) + $exp(0.06175 * (dv - 594.31)))
              / (1.0 + $exp(-0.5143 * (dv + 4.753)));
        return ak1 / (ak1 + bk1);
      end
      F_KP: return 1.0 / (1.0 + $exp((7.488 - v) / 5.98));
      default: return 0.0;
    endcase
  endfunction

  // steady state alpha/(alpha+beta) of a gate, used for the initial values
  function automatic real gate_inf(rate_fn_e fa, rate_fn_e fb, real v);
    real a, b;
    a = rate_value(fa, v);
    b = rate_value(fb, v);
    return a / (a + b);
  endfunction

endpackage
