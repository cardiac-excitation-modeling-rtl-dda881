// current_k - time-dependent potassium current of the Luo-Rudy phase-I model,
//     IK = gK * x * Xi(Vm) * (Vm - EK),   gK = 0.282 mS/cm^2, EK = -77.5673 mV,
// with its activation gate x (gate_euler) and the inactivation factor Xi,
// which is tabulated against Vm like the rate functions.
//
// Pipeline: PH_LUT reads the alpha_x, beta_x and Xi tables; PH_P1 forms
// gK*(Vm-EK) and x*Xi; PH_P2 multiplies them, so ik is valid from the end of
// PH_P2 until the next step's PH_P2.  x is committed at PH_COMMIT.  The
// conductance and reversal potential are the design's values; the formulas
// for alpha_x, beta_x and Xi are the published model's.
module current_k
  import lr1_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t ph,
  input  fix_t   vm,
  output fix_t   ik,
  output fix_t   x
);
  localparam fix_t GK = to_fix(G_K);
  localparam fix_t EK = to_fix(E_K);

  fix_t ax, bx, xi, gdv, xxi;

  vm_lut #(.FN(F_AX)) u_ax (.clk, .en(ph[PH_LUT]), .vm, .q(ax));
  vm_lut #(.FN(F_BX)) u_bx (.clk, .en(ph[PH_LUT]), .vm, .q(bx));
  vm_lut #(.FN(F_XI)) u_xi (.clk, .en(ph[PH_LUT]), .vm, .q(xi));

  gate_euler #(.INIT(gate_inf(F_AX, F_BX, VM_INIT))) u_x (.clk, .rst_n, .ph, .alpha(ax), .beta(bx), .y(x));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gdv <= '0; xxi <= '0; ik <= '0;
    end else begin
      if (ph[PH_P1]) begin
        gdv <= fmul(GK, vm - EK);
        xxi <= fmul(x, xi);
      end
      if (ph[PH_P2]) ik <= fmul(gdv, xxi);
    end
  end
endmodule
