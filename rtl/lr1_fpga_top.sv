// lr1_fpga_top - stand-alone FPGA implementation of the Luo-Rudy phase-I
// cardiac cell model.
//
// An enable switch starts and stops the simulation; while it is on, the
// solver core advances the cell model and a periodic stimulus pulse, whose
// 15-bit amplitude is an input, triggers action potentials.  After every
// step the membrane voltage is converted to a 16-bit offset-binary word for
// an external dual-channel 16-bit DAC mezzanine card (2.5 V full scale)
// that drives a data logger; the DAC card itself is outside this module,
// which brings the word and a strobe out as ports.
//
// Interface: clk (the board clock), rst_n (synchronous, active low),
// sw_enable (raw switch), stim_amp (uA/cm^2, 8 fraction bits, 80.0 = 20480
// is a typical value), dac_code/dac_valid (one word per model step), vm and
// steps for observation.  Timing: the switch takes 2^DB_BITS + 2 cycles to
// act; one model step takes STEP_CYCLES clocks; the DAC word of a step
// appears two clocks after its commit cycle.  The structure (switch,
// solver, 16-bit DAC output, 15-bit stimulus) is the design's; debounce,
// output scaling and pacing are choices of this implementation.
module lr1_fpga_top
  import lr1_pkg::*;
#(
  parameter int          DB_BITS      = 16,
  parameter int unsigned STEP_CYCLES  = NPH,
  parameter int unsigned START_STEPS  = 20000,
  parameter int unsigned PERIOD_STEPS = 100000,
  parameter int unsigned WIDTH_STEPS  = 100
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sw_enable,
  input  logic [14:0] stim_amp,
  output logic [15:0] dac_code,
  output logic        dac_valid,
  output fix_t        vm,
  output logic        running,
  output logic        stim_pulse,
  output logic [31:0] steps
);
  logic step_done, dac_load;

  switch_sync #(.DB_BITS(DB_BITS)) u_sw (.clk, .rst_n, .sw(sw_enable), .en(running));

  lr1_core #(
    .STEP_CYCLES(STEP_CYCLES), .START_STEPS(START_STEPS),
    .PERIOD_STEPS(PERIOD_STEPS), .WIDTH_STEPS(WIDTH_STEPS)
  ) u_core (
    .clk, .rst_n, .run(running), .stim_amp, .vm, .cai(), .iext(), .itot(), .stim_pulse,
    .gate_m(), .gate_h(), .gate_j(), .gate_d(), .gate_f(), .gate_x(), .step_done, .steps
  );

  // Vm takes its new value at the end of the commit cycle, so the DAC word is
  // loaded one cycle later.
  always_ff @(posedge clk) begin
    if (!rst_n) dac_load <= 1'b0;
    else        dac_load <= step_done;
  end

  ap_dac_format u_dac (.clk, .rst_n, .load(dac_load), .vm, .code(dac_code), .valid(dac_valid));
endmodule
