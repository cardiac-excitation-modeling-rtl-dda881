// tb_current_k - holds the membrane voltage at a sequence of levels (rest,
// depolarised, intermediate, rest again) and compares IK and the gate x after every
// step with a double-precision model of the same equations (lr1_ref_pkg),
// integrated with the same time step.  The voltages lie on the table grid,
// so the comparison measures the fixed-point error only: 0.2% + 0.01 uA/cm^2 on the current, 3e-4 on the gate (x is slow, so rounding accumulates).
module tb_current_k;
  import lr1_pkg::*;
  import lr1_ref_pkg::*;

  logic clk = 0, rst_n = 0, go = 0;
  phase_t ph;
  logic commit;
  int nsteps;
  fix_t vm;
  fix_t ik, x;
  int checks = 0, failures = 0;

  tb_phase_gen u_ph (.clk, .go, .ph, .commit, .nsteps);
  current_k dut (.clk, .rst_n, .ph, .vm, .ik, .x);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit close(fix_t got, real want, real rel, real abs_tol);
    real g = to_real(got);
    real tol = rel * ((want < 0) ? -want : want) + abs_tol;
    return (g - want <= tol) && (want - g <= tol);
  endfunction

  ref_state_t s;
  ref_cur_t   c;
  real v;
  int bad;

  initial begin
    s = rest(-84.0, 2.0e-4);

    vm = to_fix(-84.0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    go = 1;
    bad = 0;
    for (int k = 0; k < 2400; k++) begin
      v = (k < 100) ? -84.0 : (k < 900) ? 20.0 : (k < 1700) ? -30.0 : -84.0;
      vm = to_fix(v);
      s.v = v;

      c = currents(s);
      // wait for the commit phase of this step
      do @(negedge clk); while (!commit);
      checks++;
      if (!close(ik, c.ik, 2e-3, 1e-2)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: IK got %f want %f", k, to_real(ik), c.ik);
      end
      checks++;
      if (!close(x, s.x, 0.0, 3e-4)) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: x got %f want %f", k, to_real(x), s.x);
      end
      s = step(s, 0.0, DT_MS);
      s.v = v;

    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
