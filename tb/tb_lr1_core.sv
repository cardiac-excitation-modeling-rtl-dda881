// tb_lr1_core - runs the solver core through one stimulated action potential
// and compares it step by step with a double-precision model of the same
// equations (lr1_ref_pkg), the way a fixed-point design is judged against
// its floating-point original.
//
// Checks: resting potential before the stimulus; the largest |Vm - Vref|
// over the run stays below MAX_DIFF mV; peak, plateau and repolarisation
// shape (peak > 30 mV, action potential duration at -60 mV between 250 and
// 450 ms); each step takes exactly NPH clocks; and the run input pauses the
// model (no step commits while it is low).
// The stimulus starts after 1 ms instead of 100 ms to keep the run short.
module tb_lr1_core;
  import lr1_pkg::*;
  import lr1_ref_pkg::*;

  localparam int unsigned START  = 200;      // 1 ms
  localparam int unsigned WIDTH  = 100;      // 0.5 ms
  localparam int unsigned NSTEPS = 90000;    // 450 ms
  localparam real MAX_DIFF = 10.0;

  logic clk = 0, rst_n = 0, run = 0;
  logic [14:0] stim_amp = 15'(80 * 256);
  fix_t vm, cai, iext, itot, gm, gh, gj, gd, gf, gx;
  logic stim_pulse, step_done;
  logic [31:0] steps;

  int checks = 0, failures = 0;

  lr1_core #(.START_STEPS(START), .PERIOD_STEPS(100000), .WIDTH_STEPS(WIDTH)) dut (
    .clk, .rst_n, .run, .stim_amp, .vm, .cai, .iext, .itot, .stim_pulse,
    .gate_m(gm), .gate_h(gh), .gate_j(gj), .gate_d(gd), .gate_f(gf), .gate_x(gx),
    .step_done, .steps
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ref_state_t s;
  real maxdiff, vpk, v, t_up, t_down, apd;
  longint c0, c1;
  int paused_commits;

  initial begin
    s = rest(-84.0, 2.0e-4);
    maxdiff = 0.0; vpk = -200.0; t_up = -1.0; t_down = -1.0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run = 1;
    c0 = 0;
    for (int k = 0; k < NSTEPS; k++) begin
      // wait for this step's commit
      do @(posedge clk); while (!step_done);
      if (k == 10) c0 = $time;
      if (k == 20) begin
        c1 = $time;
        check((c1 - c0) == 10 * NPH * 10, $sformatf("step period %0d ns, expected %0d", c1 - c0, 10*NPH*10));
      end
      s = step(s, (k >= START && k < START + WIDTH) ? -80.0 : 0.0, DT_MS);
      @(negedge clk);
      v = to_real(vm);
      if (k == START - 1) check(v > -86.0 && v < -82.0, $sformatf("rest potential %f", v));
      if ((v - s.v) > maxdiff) maxdiff = v - s.v;
      if ((s.v - v) > maxdiff) maxdiff = s.v - v;
      if (v > vpk) vpk = v;
      if (t_up < 0 && v > -60.0) t_up = real'(k) * DT_MS;
      if (t_up >= 0 && t_down < 0 && k > START + 2000 && v < -60.0) t_down = real'(k) * DT_MS;
      if (k == START + 20000) check(v > -20.0 && v < 40.0, $sformatf("plateau at 100 ms: %f mV", v));
      // pause test: drop run for a while in the middle of the plateau
      if (k == START + 30000) begin
        @(posedge clk);
        run = 0;
        repeat (3 * NPH) @(posedge clk);
        paused_commits = 0;
        repeat (20 * NPH) begin
          @(posedge clk);
          if (step_done) paused_commits++;
        end
        check(paused_commits == 0, "no step commits while run is low");
        check(steps == k + 2 || steps == k + 1, $sformatf("step counter %0d at pause (k=%0d)", steps, k));
        run = 1;
      end
    end
    apd = t_down - t_up;
    $display("peak %f mV, APD(-60 mV) %f ms, max |Vm-Vref| %f mV, final Vm %f, Cai %e",
             vpk, apd, maxdiff, to_real(vm), to_real(cai) / 1000.0);
    check(vpk > 30.0 && vpk < 60.0, $sformatf("peak %f mV", vpk));
    check(t_up > 0.0 && t_up < 3.0, $sformatf("upstroke at %f ms", t_up));
    check(apd > 250.0 && apd < 450.0, $sformatf("APD %f ms", apd));
    check(maxdiff < MAX_DIFF, $sformatf("max |Vm - Vref| = %f mV", maxdiff));
    check(to_real(vm) < -80.0, "repolarised at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
