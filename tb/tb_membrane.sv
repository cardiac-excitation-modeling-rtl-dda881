// tb_membrane - drives the seven current inputs with random values and
// checks that Vm advances by exactly -dt/Cm times their sum at every step
// (computed in the testbench from the same fixed-point rounding rule), that
// the sum appears on itot at PH_SUM, that Vm changes only at PH_COMMIT, and
// that a constant outward current of 1 uA/cm^2 lowers Vm by 0.005 mV per
// step.
module tb_membrane;
  import lr1_pkg::*;

  logic clk = 0, rst_n = 0, go = 0;
  phase_t ph;
  logic commit;
  int nsteps;
  fix_t iext, ina, isi, ik, ik1, ikp, ib, itot, vm;
  int checks = 0, failures = 0;

  tb_phase_gen u_ph (.clk, .go, .ph, .commit, .nsteps);
  membrane dut (.clk, .rst_n, .ph, .iext, .ina, .isi, .ik, .ik1, .ikp, .ib, .itot, .vm);

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

  function automatic fix_t rnd(real span);
    return to_fix(span * (real'($urandom_range(0, 2000000)) / 1.0e6 - 1.0));
  endfunction

  longint sum, vexp, p;
  fix_t vprev;
  real v0, vend;

  initial begin
    {iext, ina, isi, ik, ik1, ikp, ib} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(vm == to_fix(-84.0), "reset value -84 mV");
    go = 1;
    for (int k = 0; k < 300; k++) begin
      iext = rnd(80.0); ina = rnd(300.0); isi = rnd(10.0); ik = rnd(3.0);
      ik1 = rnd(3.0); ikp = rnd(1.0); ib = rnd(5.0);
      sum = longint'(iext) + ina + isi + ik + ik1 + ikp + ib;
      // -dt/Cm in Q22, then the rounded product
      p = longint'(to_fix(-0.005)) * sum + (longint'(1) << 21);
      vexp = longint'(vm) + (p >>> 22);
      vprev = vm;
      for (int c = 0; c < NPH; c++) begin
        @(negedge clk);
        if (c == PH_SUM) check(longint'(itot) == sum, $sformatf("itot at step %0d", k));
        if (c < NPH - 1) check(vm == vprev, "vm changes only at PH_COMMIT");
      end
      check(longint'(vm) == vexp, $sformatf("step %0d: vm %f expected %f", k, to_real(vm), real'(vexp) / 4194304.0));
    end
    {iext, ina, isi, ik, ikp, ib} = '0;
    ik1 = to_fix(1.0);
    v0 = to_real(vm);
    repeat (100 * NPH) @(negedge clk);
    vend = to_real(vm);
    check((v0 - vend) > 0.4999 && (v0 - vend) < 0.5001, $sformatf("100 steps of 1 uA/cm^2: %f mV", v0 - vend));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
