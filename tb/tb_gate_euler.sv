// tb_gate_euler - integrates one gate with constant and then changing alpha
// and beta, and compares it after every step with a double-precision Euler
// integration (error below 2e-5).  Also checks that y changes only in the
// commit phase and that it settles at alpha/(alpha+beta).
module tb_gate_euler;
  import lr1_pkg::*;

  logic clk = 0, rst_n = 0, go = 0;
  phase_t ph;
  logic commit;
  int nsteps;
  fix_t alpha, beta, y;
  int checks = 0, failures = 0;

  tb_phase_gen u_ph (.clk, .go, .ph, .commit, .nsteps);
  gate_euler #(.INIT(0.9)) dut (.clk, .rst_n, .ph, .alpha, .beta, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real yr, a, b, e;
  fix_t yprev;
  int changed_outside;

  initial begin
    a = 2.0; b = 6.0;
    alpha = to_fix(a); beta = to_fix(b);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(y == to_fix(0.9), "reset value");
    yr = 0.9;
    go = 1;
    changed_outside = 0;
    for (int k = 0; k < 3000; k++) begin
      if (k == 1500) begin a = 0.3; b = 0.05; end
      alpha = to_fix(a); beta = to_fix(b);
      yprev = y;
      for (int c = 0; c < NPH; c++) begin
        @(negedge clk);
        if (c != NPH - 1 && y != yprev) changed_outside++;
      end
      yr = yr + DT_MS * (a * (1.0 - yr) - b * yr);
      e = to_real(y) - yr;
      if (k % 100 == 99) check(e < 2e-5 && e > -2e-5, $sformatf("step %0d: y=%f ref=%f", k, to_real(y), yr));
      if (k == 1499) check(to_real(y) > 0.2499 && to_real(y) < 0.2501 , $sformatf("steady state %f", to_real(y)));
    end
    check(changed_outside == 0, "y changes only in the commit phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
