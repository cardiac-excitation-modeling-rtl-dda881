// tb_esi_calc - compares ESi = 7.7 - 13.0287*ln([Ca]i) from the logarithm
// table with the directly computed value for random concentrations spread
// logarithmically over 1e-5 .. 1e-1 mM (error below 0.1 mV), for the
// resting value 1e-4 mM, and for a non-positive input (treated as one LSB).
// The block takes [Ca]i in uM.
// It also checks the timing: ca sampled at PH_LUT, esi updated at PH_P1 and
// held in the other phases.
module tb_esi_calc;
  import lr1_pkg::*;

  logic clk = 0, rst_n = 0;
  phase_t ph = '0;
  fix_t ca, esi;
  int checks = 0, failures = 0;

  esi_calc dut (.clk, .rst_n, .ph, .ca, .esi);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_step(fix_t c);
    ca = c;
    ph = '0; ph[PH_LUT] = 1'b1; @(negedge clk);
    ca = '0;                       // ca must only matter at PH_LUT
    ph = '0; ph[PH_P1] = 1'b1;  @(negedge clk);
    ph = '0;
  endtask

  real c, want, got;
  fix_t held;

  initial begin
    ca = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      c = 1.0e-5 * $pow(10.0, 4.0 * real'($urandom_range(0, 100000)) / 1.0e5);
      run_step(to_fix(c * 1000.0));
      want = 7.7 - 13.0287 * $ln(to_real(to_fix(c * 1000.0)) / 1000.0);
      got  = to_real(esi);
      check(got - want < 0.1 && want - got < 0.1, $sformatf("ca=%e esi=%f want %f", c, got, want));
    end
    run_step(to_fix(0.1));
    check(to_real(esi) > 127.6 && to_real(esi) < 127.8, $sformatf("ESi at 1e-4 mM = %f", to_real(esi)));
    run_step('0);
    want = 7.7 - 13.0287 * $ln(1.0 / 4194304.0 / 1000.0);
    check(to_real(esi) - want < 0.1 && want - to_real(esi) < 0.1, "zero input treated as one LSB");
    held = esi;
    ph = '0; ph[PH_LUT] = 1'b1; ca = to_fix(1.0e-3); @(negedge clk);
    ph = '0; ph[PH_SUM] = 1'b1; @(negedge clk);
    check(esi == held, "esi holds outside PH_P1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
