// tb_vm_lut - checks lookup-table ROMs against directly computed values.
// Two tables are instantiated (beta_m, an exponential, and Kp, a sigmoid).
// For random voltages the read value must match the formula evaluated at the
// nearest 1/16 mV grid point within 1e-6 relative plus 2 LSB; voltages
// outside -128..+128 mV must read the end entries; the output must hold while
// en is low and appear exactly one clock after an enabled read.
module tb_vm_lut;
  import lr1_pkg::*;
  import lr1_ref_pkg::*;

  logic clk = 0, en = 0;
  fix_t vm = '0, q_bm, q_kp;
  int checks = 0, failures = 0;

  vm_lut #(.FN(F_BM)) dut_bm (.clk, .en, .vm, .q(q_bm));
  vm_lut #(.FN(F_KP)) dut_kp (.clk, .en, .vm, .q(q_kp));

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

  function automatic bit close(fix_t got, real want);
    real g = real'(got) / 4194304.0;
    real tol = 1.0e-6 * ((want < 0) ? -want : want) + 2.0 / 4194304.0;
    return (g - want <= tol) && (want - g <= tol);
  endfunction

  real v, vg;
  fix_t hold;

  initial begin
    @(negedge clk);
    for (int n = 0; n < 500; n++) begin
      v  = -127.0 + 254.0 * real'($urandom_range(0, 1000000)) / 1.0e6;
      vg = real'($rtoi((v + 128.0) * 16.0 + 0.5)) / 16.0 - 128.0;   // nearest grid point
      vm = fix_t'(longint'(v * 4194304.0));
      en = 1;
      @(negedge clk);
      check(close(q_bm, bm(vg)), $sformatf("beta_m(%f): got %f want %f", v, to_real(q_bm), bm(vg)));
      check(close(q_kp, kp(vg)), $sformatf("Kp(%f): got %f want %f", v, to_real(q_kp), kp(vg)));
    end
    // clamping
    vm = fix_t'(longint'(-200.0 * 4194304.0)); @(negedge clk);
    check(close(q_bm, (bm(-128.0) > 8191.9999) ? 8191.9999997 : bm(-128.0)), "clamp low (saturated entry)");
    vm = fix_t'(longint'(300.0 * 4194304.0)); @(negedge clk);
    check(close(q_kp, kp(128.0 - 1.0/16.0)), "clamp high");
    // hold while disabled
    hold = q_bm;
    en = 0;
    vm = fix_t'(longint'(-50.0 * 4194304.0));
    repeat (3) @(negedge clk);
    check(q_bm == hold, "output holds while en is low");
    en = 1; @(posedge clk); #1;
    check(close(q_bm, bm(-50.0)), "value one clock after enabled read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
