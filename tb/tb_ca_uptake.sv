// tb_ca_uptake - drives a slow-inward-current waveform (rest, a strong
// inward pulse as in an action potential, then zero) and compares [Ca]i after
// every step with a double-precision Euler integration of
// d[Ca]i/dt = -1e-4*Isi + 0.07*(1e-4 - [Ca]i) in mM (error below 1% + 1e-7 mM);
// the block holds [Ca]i in uM.
// Also checks the reset value and that [Ca]i changes only at PH_COMMIT.
module tb_ca_uptake;
  import lr1_pkg::*;

  logic clk = 0, rst_n = 0, go = 0;
  phase_t ph;
  logic commit;
  int nsteps;
  fix_t isi, ca, cprev;
  int checks = 0, failures = 0;

  tb_phase_gen u_ph (.clk, .go, .ph, .commit, .nsteps);
  ca_uptake dut (.clk, .rst_n, .ph, .isi, .ca);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real cr, i, e, tol;
  int moved;

  initial begin
    isi = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (ca != to_fix(0.2)) begin failures++; $display("FAIL: reset value"); end
    cr = 2.0e-4;
    go = 1;
    moved = 0;
    for (int k = 0; k < 60000; k++) begin
      i = (k < 2000) ? 0.0 : (k < 22000) ? -4.0 : 0.0;
      isi = to_fix(i);
      cprev = ca;
      for (int c = 0; c < NPH; c++) begin
        @(negedge clk);
        if (c != NPH - 1 && ca != cprev) moved++;
      end
      cr = cr + DT_MS * (-1.0e-4 * i + 0.07 * (1.0e-4 - cr));
      if (k % 500 == 499) begin
        e = to_real(ca) / 1000.0 - cr;
        tol = 0.01 * cr + 1.0e-7;
        checks++;
        if (e > tol || -e > tol) begin
          failures++;
          $display("FAIL step %0d: ca %e want %e", k, to_real(ca) / 1000.0, cr);
        end
      end
    end
    checks++;
    if (moved != 0) begin failures++; $display("FAIL: ca changed outside PH_COMMIT"); end
    $display("final ca %e ref %e", to_real(ca) / 1000.0, cr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
