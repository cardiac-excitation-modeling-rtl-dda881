// current_kp - plateau potassium current of the Luo-Rudy phase-I model,
//     IKp = gKp * Kp(Vm) * (Vm - EKp),   gKp = 0.0183 mS/cm^2, EKp = -87.8925 mV,
// where Kp = 1/(1+exp((7.488-Vm)/5.98)) is tabulated against Vm.
//
// Pipeline: PH_LUT reads the Kp table; PH_P1 forms gKp*(Vm-EKp); PH_P2
// multiplies by Kp, so ikp is valid from the end of PH_P2 until the next
// step's PH_P2.  Conductance and reversal potential are the design's values;
// the Kp formula is the published model's.
module current_kp
  import lr1_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t ph,
  input  fix_t   vm,
  output fix_t   ikp
);
  localparam fix_t GKP = to_fix(G_KP);
  localparam fix_t EKP = to_fix(E_KP);

  fix_t kp, gdv;

  vm_lut #(.FN(F_KP)) u_kp (.clk, .en(ph[PH_LUT]), .vm, .q(kp));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gdv <= '0; ikp <= '0;
    end else begin
      if (ph[PH_P1]) gdv <= fmul(GKP, vm - EKP);
      if (ph[PH_P2]) ikp <= fmul(gdv, kp);
    end
  end
endmodule
