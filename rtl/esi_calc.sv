// esi_calc - reversal potential of the slow inward current,
//     ESi = 7.7 - 13.0287 * ln([Ca]i)      (mV, [Ca]i in mM).
// The input is [Ca]i in uM, so ln([Ca]i in mM) = ln(ca) - ln(1000).
//
// The logarithm is read from a table.  [Ca]i is a positive fixdt(1,36,22)
// number whose raw integer is c = 2^p * (1 + u), 0 <= u < 1, where p is the
// position of the leading one.  Then ln(ca) = (p - 22)*ln2 + ln(1+u).  A
// leading-one detector finds p, the 8 bits after the leading one address a
// 256-entry table holding 13.0287*ln(1 + (k+0.5)/256), and
//     ESi = (7.7 + 13.0287*(22*ln2 + ln 1000)) - p*(13.0287*ln2) - table[k].
// Values of [Ca]i at or below zero are treated as one LSB.
//
// Timing: ca is sampled at PH_LUT (table read and leading-one position are
// registered); esi is registered at PH_P1 and holds until the next step's
// PH_P1.  The constants 7.7 and 13.0287 and the use of a lookup table are the
// design's; splitting the logarithm into exponent and mantissa is a choice
// of this implementation that keeps the table small.
module esi_calc
  import lr1_pkg::*;
#(
  parameter int MBITS = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t ph,
  input  fix_t   ca,
  output fix_t   esi
);
  localparam real  LN2  = 0.6931471805599453;
  localparam fix_t C0   = to_fix(ESI_C + ESI_K * (real'(FL) * LN2 + $ln(CA_UM_PER_MM)));
  localparam fix_t KLN2 = to_fix(ESI_K * LN2);

  fix_t rom [1 << MBITS];

  initial begin
    for (int k = 0; k < (1 << MBITS); k++)
      rom[k] = to_fix(ESI_K * $ln(1.0 + (real'(k) + 0.5) / real'(1 << MBITS)));
  end

  logic [WL-2:0]    c;       // magnitude, positive
  logic [5:0]       p;       // leading-one position
  logic [WL-2:0]    norm;
  logic [MBITS-1:0] k;

  always_comb begin
    c = (ca <= 0) ? (WL-1)'(1) : ca[WL-2:0];
    p = '0;
    for (int i = 0; i < WL - 1; i++) if (c[i]) p = 6'(i);
    norm = c << ((WL - 2) - int'(p));
    k    = norm[WL-3 -: MBITS];
  end

  logic [5:0] p_r;
  fix_t       t_r;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_r <= '0; t_r <= '0; esi <= '0;
    end else begin
      if (ph[PH_LUT]) begin
        p_r <= p;
        t_r <= rom[k];
      end
      if (ph[PH_P1]) esi <= C0 - KLN2 * fix_t'(p_r) - t_r;
    end
  end
endmodule
