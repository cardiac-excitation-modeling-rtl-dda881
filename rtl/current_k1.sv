// current_k1 - time-independent potassium current of the Luo-Rudy phase-I
// model,
//     IK1 = gK1 * K1inf(Vm) * (Vm - EK1),   gK1 = 0.6047 mS/cm^2, EK1 = -87.8925 mV.
// K1inf = aK1/(aK1+bK1) has no state; it is tabulated against Vm.
//
// Pipeline: PH_LUT reads the K1inf table; PH_P1 forms gK1*(Vm-EK1); PH_P2
// multiplies by K1inf, so ik1 is valid from the end of PH_P2 until the next
// step's PH_P2.  Conductance and reversal potential are the design's values;
// the K1inf formula is the published model's.
module current_k1
  import lr1_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t ph,
  input  fix_t   vm,
  output fix_t   ik1
);
  localparam fix_t GK1 = to_fix(G_K1);
  localparam fix_t EK1 = to_fix(E_K1);

  fix_t k1inf, gdv;

  vm_lut #(.FN(F_K1INF)) u_k1 (.clk, .en(ph[PH_LUT]), .vm, .q(k1inf));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gdv <= '0; ik1 <= '0;
    end else begin
      if (ph[PH_P1]) gdv <= fmul(GK1, vm - EK1);
      if (ph[PH_P2]) ik1 <= fmul(gdv, k1inf);
    end
  end
endmodule
