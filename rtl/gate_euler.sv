// gate_euler - one Hodgkin-Huxley gating variable y of the Luo-Rudy phase-I
// model, integrated with the forward Euler rule
//     y <= y + dt * (alpha*(1-y) - beta*y)
// (Eq. 2-7 of the model; y is one of m, h, j, d, f, x).
//
// Pipeline: at phase PH_P1 the two products alpha*(1-y) and beta*y are
// registered; at PH_P2 the new value y + dt*(difference) is registered; at
// PH_COMMIT it is copied into y.  y therefore keeps its old value for the
// whole step, so the current blocks may read it at any phase of the step.
// alpha and beta come from vm_lut ROMs read at PH_LUT.
//
// Interface: ph is the one-hot phase vector of step_ctrl; rst_n (synchronous,
// active low) loads INIT.  The Euler rule follows the model's discrete-time
// integrators; dt (lr1_pkg::DT_MS = 0.005 ms) and the stage split are choices
// of this implementation.
module gate_euler
  import lr1_pkg::*;
#(
  parameter real INIT = 0.0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t ph,
  input  fix_t   alpha,
  input  fix_t   beta,
  output fix_t   y
);
  localparam fix_t ONE = to_fix(1.0);
  localparam fix_t DT  = to_fix(DT_MS);

  fix_t pa, pb, y_next;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y      <= to_fix(INIT);
      y_next <= to_fix(INIT);
      pa     <= '0;
      pb     <= '0;
    end else begin
      if (ph[PH_P1]) begin
        pa <= fmul(alpha, ONE - y);
        pb <= fmul(beta, y);
      end
      if (ph[PH_P2])     y_next <= y + fmul(DT, pa - pb);
      if (ph[PH_COMMIT]) y      <= y_next;
    end
  end
endmodule
