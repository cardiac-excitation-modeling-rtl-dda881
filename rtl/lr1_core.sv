// lr1_core - Luo-Rudy phase-I ventricular cell solver.
//
// The model's eight state variables (Vm, the gates m, h, j, d, f, x and the
// intracellular calcium [Ca]i) are advanced one forward-Euler step of
// dt = 0.005 ms per pass through a seven-phase pipeline sequenced by
// step_ctrl:
//   PH_LUT    the tables of alpha/beta, Xi, K1inf, Kp (vm_lut) and of
//             ln [Ca]i (esi_calc) are read with the committed state;
//   PH_P1..P4 the six ionic currents are built as chains of registered
//             products (current_*), ESi at PH_P1;
//   PH_SUM    Iext + Iion and d[Ca]i/dt are registered;
//   PH_COMMIT Vm, [Ca]i and all gates take their new values together.
// Every signal is fixdt(1,36,22).
//
// Interface: run (level) lets steps start; stim_amp sets the stimulus pulse
// amplitude (unsigned, uA/cm^2, 8 fraction bits).  vm (mV), cai (uM) and the
// gates are
// the committed state; step_done marks the commit cycle, after which vm
// holds the new value.  STEP_CYCLES (>= 7) clocks per step; the stimulus
// timing parameters are in steps.  The model equations, constants and
// fixed-point format are the design's; the phase schedule, time step and
// stimulus timing are choices of this implementation.
module lr1_core
  import lr1_pkg::*;
#(
  parameter int unsigned STEP_CYCLES  = NPH,
  parameter int unsigned START_STEPS  = 20000,
  parameter int unsigned PERIOD_STEPS = 100000,
  parameter int unsigned WIDTH_STEPS  = 100
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic [14:0] stim_amp,
  output fix_t        vm,
  output fix_t        cai,
  output fix_t        iext,
  output fix_t        itot,
  output logic        stim_pulse,
  output fix_t        gate_m,
  output fix_t        gate_h,
  output fix_t        gate_j,
  output fix_t        gate_d,
  output fix_t        gate_f,
  output fix_t        gate_x,
  output logic        step_done,
  output logic [31:0] steps
);
  phase_t ph;
  fix_t   ina, isi, ik, ik1, ikp, ib, esi;

  step_ctrl #(.STEP_CYCLES(STEP_CYCLES)) u_ctrl (
    .clk, .rst_n, .run, .ph, .step_done, .steps
  );

  stimulus #(
    .START_STEPS(START_STEPS), .PERIOD_STEPS(PERIOD_STEPS), .WIDTH_STEPS(WIDTH_STEPS)
  ) u_stim (
    .clk, .rst_n, .adv(step_done), .stim_amp, .iext, .pulse(stim_pulse)
  );

  current_na u_na  (.clk, .rst_n, .ph, .vm, .ina, .m(gate_m), .h(gate_h), .j(gate_j));
  current_si u_si  (.clk, .rst_n, .ph, .vm, .esi, .isi, .d(gate_d), .f(gate_f));
  current_k  u_k   (.clk, .rst_n, .ph, .vm, .ik, .x(gate_x));
  current_k1 u_k1  (.clk, .rst_n, .ph, .vm, .ik1);
  current_kp u_kp  (.clk, .rst_n, .ph, .vm, .ikp);
  current_b  u_b   (.clk, .rst_n, .ph, .vm, .ib);

  esi_calc   u_esi (.clk, .rst_n, .ph, .ca(cai), .esi);
  ca_uptake  u_ca  (.clk, .rst_n, .ph, .isi, .ca(cai));

  membrane   u_mem (.clk, .rst_n, .ph, .iext, .ina, .isi, .ik, .ik1, .ikp, .ib, .itot, .vm);
endmodule
