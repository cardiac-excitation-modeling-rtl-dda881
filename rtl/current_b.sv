// current_b - background current of the Luo-Rudy phase-I model,
//     Ib = gb * (Vm - Eb),   gb = 0.03921 mS/cm^2, Eb = -59.87 mV.
//
// A single registered product: Vm is sampled at PH_P1 and ib is valid from the
// end of PH_P1 until the next step's PH_P1.  Conductance and reversal
// potential are the design's values.
module current_b
  import lr1_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  phase_t ph,
  input  fix_t   vm,
  output fix_t   ib
);
  localparam fix_t GB = to_fix(G_B);
  localparam fix_t EB = to_fix(E_B);

  always_ff @(posedge clk) begin
    if (!rst_n)         ib <= '0;
    else if (ph[PH_P1]) ib <= fmul(GB, vm - EB);
  end
endmodule
