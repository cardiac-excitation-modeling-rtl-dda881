// membrane - membrane voltage integrator of the Luo-Rudy phase-I model,
//     dVm/dt = -(Iext + Iion)/Cm,   Iion = INa + Isi + IK + IK1 + IKp + Ib,
// with Cm = 1 uF/cm^2, integrated with forward Euler.
//
// Timing: all seven currents must be valid at PH_SUM, where their sum is
// registered.  At PH_COMMIT Vm takes Vm + (-dt/Cm)*sum: the division by the
// capacitance is a multiplication by the precomputed constant -dt/Cm.
// Reset loads -84 mV.  The equations and Cm are the design's; replacing the
// divider by a constant multiplier, the time step and the reset value are
// choices of this implementation.
module membrane
  import lr1_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t ph,
  input  fix_t   iext,
  input  fix_t   ina,
  input  fix_t   isi,
  input  fix_t   ik,
  input  fix_t   ik1,
  input  fix_t   ikp,
  input  fix_t   ib,
  output fix_t   itot,
  output fix_t   vm
);
  localparam fix_t K_STEP = to_fix(-DT_MS / CM);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vm   <= to_fix(VM_INIT);
      itot <= '0;
    end else begin
      if (ph[PH_SUM])    itot <= iext + ina + isi + ik + ik1 + ikp + ib;
      if (ph[PH_COMMIT]) vm   <= vm + fmul(K_STEP, itot);
    end
  end
endmodule
