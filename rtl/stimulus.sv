// stimulus - external stimulus current Iext of the cell model: a train of
// rectangular pulses of amplitude -stim_amp.
//
// The first pulse begins at step START_STEPS; pulses repeat every
// PERIOD_STEPS steps and last WIDTH_STEPS steps.  With dt = 0.005 ms the
// defaults are onset 100 ms, period 500 ms, width 0.5 ms.  stim_amp is an
// unsigned 15-bit magnitude in uA/cm^2 with 8 fraction bits; the output is
// negative because Iext enters dVm/dt = -(Iext+Iion)/Cm, where a negative
// current depolarises the cell.
//
// Interface: iext is the current for the present step and is valid the whole
// step; adv (the step's commit strobe) moves to the next step.  A 15-bit
// stimulus word is the design's; its scaling and the pulse timing are
// choices of this implementation.
module stimulus
  import lr1_pkg::*;
#(
  parameter int unsigned START_STEPS  = 20000,
  parameter int unsigned PERIOD_STEPS = 100000,
  parameter int unsigned WIDTH_STEPS  = 100
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        adv,
  input  logic [14:0] stim_amp,
  output fix_t        iext,
  output logic        pulse
);
  localparam int AMP_FL = 8;

  logic [31:0] pre, pos;
  logic        started;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pre     <= '0;
      pos     <= '0;
      started <= (START_STEPS == 0);
    end else if (adv) begin
      if (!started) begin
        if (pre == START_STEPS - 1) started <= 1'b1;
        else                        pre     <= pre + 1;
      end else begin
        pos <= (pos == PERIOD_STEPS - 1) ? '0 : pos + 1;
      end
    end
  end

  always_comb begin
    pulse = started && (pos < WIDTH_STEPS);
    iext  = pulse ? -(fix_t'(stim_amp) <<< (FL - AMP_FL)) : '0;
  end

  initial assert (WIDTH_STEPS <= PERIOD_STEPS && PERIOD_STEPS > 0)
    else $error("stimulus: WIDTH_STEPS must not exceed PERIOD_STEPS");
endmodule
