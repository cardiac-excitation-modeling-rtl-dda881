// ap_dac_format - turns the membrane voltage into the 16-bit word for the
// digital-to-analog converter that shows the action potential.
//
// Vm (fixdt(1,36,22), mV) is rounded to 1/256 mV, saturated to the signed
// 16-bit range (-128 .. +127.996 mV) and written as offset binary (the sign
// bit inverted), so code 0 is -128 mV, 32768 is 0 mV and 65535 the top of a
// unipolar DAC's range (2.5 V on the converter used with this design).
//
// Interface: on a cycle with load high the new code is registered and valid
// pulses for one cycle; the code holds until the next load.  The 16-bit
// output is the design's; the scaling and coding are choices of this
// implementation.
module ap_dac_format
  import lr1_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  fix_t        vm,
  output logic [15:0] code,
  output logic        valid
);
  localparam int SH = FL - 8;

  fix_t        q;
  logic [15:0] c;

  always_comb begin
    q = (vm + fix_t'(longint'(1) << (SH - 1))) >>> SH;
    if (q > 32767)       c = 16'h7fff;
    else if (q < -32768) c = 16'h8000;
    else                 c = q[15:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      code  <= 16'h8000;
      valid <= 1'b0;
    end else begin
      valid <= load;
      if (load) code <= {~c[15], c[14:0]};
    end
  end
endmodule
