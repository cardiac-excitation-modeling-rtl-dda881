// step_ctrl - sequencer of the pipelined solver datapath.
//
// One forward-Euler step of the cell model passes through NPH = 7 pipeline
// phases (lr1_pkg: table read, four product levels, current sum, commit).
// The controller runs a cycle counter from 0 to STEP_CYCLES-1 and drives the
// one-hot phase vector ph for the first NPH cycles of each step; the
// remaining STEP_CYCLES-NPH cycles are idle.  STEP_CYCLES = NPH runs the
// model as fast as the pipeline allows; STEP_CYCLES = f_clk * dt paces it to
// real time (dt = 5 us).
//
// Interface: a step starts on a cycle where run is high and no step is in
// progress, and always runs to its commit phase, so the model state is never
// left half-updated when run falls.  step_done is high in the commit cycle;
// steps counts committed steps.  The pipelined datapath is the design's; the
// phase schedule and the pacing counter are choices of this implementation.
module step_ctrl
  import lr1_pkg::*;
#(
  parameter int unsigned STEP_CYCLES = NPH
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  output phase_t      ph,
  output logic        step_done,
  output logic [31:0] steps
);
  logic        active;
  logic [31:0] cyc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      cyc    <= '0;
      steps  <= '0;
    end else begin
      if (!active) begin
        if (run) begin
          active <= 1'b1;
          cyc    <= '0;
        end
      end else begin
        if (cyc == STEP_CYCLES - 1) begin
          cyc    <= '0;
          active <= run;
        end else begin
          cyc <= cyc + 1;
        end
      end
      if (step_done) steps <= steps + 1;
    end
  end

  always_comb begin
    ph = '0;
    if (active && cyc < NPH) ph[cyc[$clog2(NPH)-1:0]] = 1'b1;
    step_done = ph[PH_COMMIT];
  end

  initial assert (STEP_CYCLES >= NPH)
    else $error("step_ctrl: STEP_CYCLES must be at least NPH");

  always_ff @(posedge clk) begin
    if (rst_n) assert ((ph & (ph - 1'b1)) == '0) else $error("step_ctrl: more than one phase active");
  end
endmodule
