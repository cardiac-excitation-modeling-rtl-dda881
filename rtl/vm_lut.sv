// vm_lut - synchronous lookup-table ROM for one voltage-dependent function of
// the Luo-Rudy phase-I model (a gate's alpha or beta, or a rectification
// factor such as Xi, K1inf or Kp).
//
// The exponentials of the model are not evaluated in hardware: each function
// is tabulated over -128..+128 mV in 1/16 mV steps (4096 entries) and the
// entry nearest to Vm is read.  Voltages outside the range read the end
// entries.  The table contents are computed when the ROM is initialised, from
// the real-valued formula in lr1_pkg::rate_value, so no data file is needed.
// Entry i holds FN evaluated at -128 + i/16 mV, saturated to the fixed-point
// range (beta_m exceeds it below about -127 mV).
//
// Interface: vm (fixdt(1,36,22), mV) is sampled when en is high; q holds the
// table value one clock later and keeps it until the next enabled read.
// Using a lookup table for the exponentials follows the design's method; the
// range, the resolution and the nearest-entry read are choices of this
// implementation.
module vm_lut
  import lr1_pkg::*;
#(
  parameter rate_fn_e FN = F_AM
) (
  input  logic clk,
  input  logic en,
  input  fix_t vm,
  output fix_t q
);
  localparam int N = 1 << LUT_ABITS;

  fix_t rom [N];

  initial begin
    for (int i = 0; i < N; i++) rom[i] = to_fix_sat(rate_value(FN, lut_voltage(i)));
  end

  always_ff @(posedge clk) begin
    if (en) q <= rom[lut_index(vm)];
  end
endmodule
