// ca_uptake - intracellular calcium concentration of the Luo-Rudy phase-I
// model,
//     d[Ca]i/dt = -1e-4 * Isi + 0.07 * (1e-4 - [Ca]i),
// integrated with forward Euler: [Ca]i <= [Ca]i + dt * d[Ca]i/dt.
// The state is kept in uM (the equation multiplied by 1000): in mM the
// recovery term would move [Ca]i by less than one LSB per step and the
// concentration would never return to rest.
//
// Timing: isi must be valid at PH_SUM (it is from the end of PH_P3); the
// derivative is registered at PH_SUM and the state is committed at PH_COMMIT,
// together with every other state variable.  Reset loads 0.2 uM (2e-4 mM).
// The equation and its constants are the design's (the uptake rate 0.07);
// the uM scaling, the time step, reset value and stage split are choices of
// this implementation.
module ca_uptake
  import lr1_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t ph,
  input  fix_t   isi,
  output fix_t   ca
);
  localparam fix_t K_ISI  = to_fix(-CA_ISI);
  localparam fix_t K_RATE = to_fix(CA_RATE);
  localparam fix_t C_REST = to_fix(CA_REST);
  localparam fix_t DT     = to_fix(DT_MS);

  fix_t dca;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ca  <= to_fix(CA_INIT);
      dca <= '0;
    end else begin
      if (ph[PH_SUM])    dca <= fmul(K_ISI, isi) + fmul(K_RATE, C_REST - ca);
      if (ph[PH_COMMIT]) ca  <= ca + fmul(DT, dca);
    end
  end
endmodule
