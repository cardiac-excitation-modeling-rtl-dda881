// tb_phase_gen - testbench helper that drives the one-hot phase vector of the
// solver's seven-phase step, back to back, once go is high.  commit is high
// in the last phase of each step; nsteps counts committed steps.
module tb_phase_gen
  import lr1_pkg::*;
(
  input  logic   clk,
  input  logic   go,
  output phase_t ph,
  output logic   commit,
  output int     nsteps
);
  int cyc = 0;
  initial nsteps = 0;
  always @(posedge clk) begin
    if (go) begin
      cyc <= (cyc == NPH - 1) ? 0 : cyc + 1;
      if (cyc == NPH - 1) nsteps <= nsteps + 1;
    end
  end
  always_comb begin
    ph = '0;
    if (go) ph[cyc] = 1'b1;
    commit = ph[PH_COMMIT];
  end
endmodule
