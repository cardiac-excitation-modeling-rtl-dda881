// current_na - fast sodium current of the Luo-Rudy phase-I model,
//     INa = gNa * m^3 * h * j * (Vm - ENa),   gNa = 23 mS/cm^2, ENa = 54.7942 mV,
// together with its three gates m (activation), h (inactivation) and j (slow
// inactivation), each integrated by gate_euler from tabulated alpha/beta.
//
// Pipeline (phases of lr1_pkg): PH_LUT reads the six rate tables; PH_P1
// forms gNa*(Vm-ENa) and h*j; PH_P2 multiplies each by m; PH_P3 multiplies the
// two; PH_P4 multiplies by m once more, so ina is valid from the end of PH_P4
// until the next step's PH_P4.  The products are ordered so that the large
// driving-force term is multiplied by the small gate values last, which
// keeps precision in the 22-bit fraction.  The gates are committed at
// PH_COMMIT.  The conductance and reversal potential are the design's values;
// the rate formulas are the published model's; the product order and stage
// split are choices of this implementation.
module current_na
  import lr1_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t ph,
  input  fix_t   vm,
  output fix_t   ina,
  output fix_t   m,
  output fix_t   h,
  output fix_t   j
);
  localparam fix_t GNA = to_fix(G_NA);
  localparam fix_t ENA = to_fix(E_NA);

  fix_t am, bm, ah, bh, aj, bj;
  fix_t gdv, hj, gdv_m, hjm, p3;

  vm_lut #(.FN(F_AM)) u_am (.clk, .en(ph[PH_LUT]), .vm, .q(am));
  vm_lut #(.FN(F_BM)) u_bm (.clk, .en(ph[PH_LUT]), .vm, .q(bm));
  vm_lut #(.FN(F_AH)) u_ah (.clk, .en(ph[PH_LUT]), .vm, .q(ah));
  vm_lut #(.FN(F_BH)) u_bh (.clk, .en(ph[PH_LUT]), .vm, .q(bh));
  vm_lut #(.FN(F_AJ)) u_aj (.clk, .en(ph[PH_LUT]), .vm, .q(aj));
  vm_lut #(.FN(F_BJ)) u_bj (.clk, .en(ph[PH_LUT]), .vm, .q(bj));

  gate_euler #(.INIT(gate_inf(F_AM, F_BM, VM_INIT))) u_m (.clk, .rst_n, .ph, .alpha(am), .beta(bm), .y(m));
  gate_euler #(.INIT(gate_inf(F_AH, F_BH, VM_INIT))) u_h (.clk, .rst_n, .ph, .alpha(ah), .beta(bh), .y(h));
  gate_euler #(.INIT(gate_inf(F_AJ, F_BJ, VM_INIT))) u_j (.clk, .rst_n, .ph, .alpha(aj), .beta(bj), .y(j));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gdv <= '0; hj <= '0; gdv_m <= '0; hjm <= '0; p3 <= '0; ina <= '0;
    end else begin
      if (ph[PH_P1]) begin
        gdv <= fmul(GNA, vm - ENA);
        hj  <= fmul(h, j);
      end
      if (ph[PH_P2]) begin
        gdv_m <= fmul(gdv, m);
        hjm   <= fmul(hj, m);
      end
      if (ph[PH_P3]) p3  <= fmul(gdv_m, hjm);
      if (ph[PH_P4]) ina <= fmul(p3, m);
    end
  end
endmodule
