// tb_lr1_fpga_top - end-to-end run of the stand-alone FPGA design with every
// parameter at its default: 1500 ms of model time (300000 steps of 5 us), a
// stimulus of 80 uA/cm^2 every 500 ms from 100 ms on, so three action
// potentials.  The enable switch is pressed with contact bounce, released
// for a while in the middle of the run and pressed again.
//
// Every DAC word is compared with the membrane voltage it encodes, and Vm
// with a double-precision model of the same equations advanced in lock step
// (lr1_ref_pkg); the largest difference must stay below 5 mV.  Per beat the
// peak, the plateau and the repolarisation are checked.  Mechanisms counted,
// each must occur: debounced switch presses, pauses (no step while the switch
// is off), stimulus pulses, action potentials, DAC updates.
module tb_lr1_fpga_top;
  import lr1_pkg::*;
  import lr1_ref_pkg::*;

  localparam int  NSTEPS   = 300000;
  localparam real MAX_DIFF = 5.0;

  logic clk = 0, rst_n = 0, sw_enable = 0;
  logic [14:0] stim_amp = 15'(80 * 256);
  logic [15:0] dac_code;
  logic dac_valid, running, stim_pulse;
  fix_t vm;
  logic [31:0] steps;

  int checks = 0, failures = 0;

  lr1_fpga_top dut (
    .clk, .rst_n, .sw_enable, .stim_amp, .dac_code, .dac_valid, .vm, .running,
    .stim_pulse, .steps
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // switch: bouncy press, release at 700 ms of model time, press again
  int presses = 0, pauses = 0, paused_steps = 0;
  task automatic press(logic lvl);
    repeat (8) begin
      sw_enable = lvl;  repeat ($urandom_range(50, 500)) @(negedge clk);
      sw_enable = !lvl; repeat ($urandom_range(50, 500)) @(negedge clk);
    end
    sw_enable = lvl;
  endtask

  always @(posedge clk) if (rst_n && running && !$past(running)) presses++;

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    press(1'b1);
    wait (steps == 140000);
    press(1'b0);
    wait (!running);
    // the step in progress completes, then nothing may move
    repeat (20) @(negedge clk);
    begin
      automatic logic [31:0] s0 = steps;
      repeat (5000) begin
        @(negedge clk);
        if (steps != s0) paused_steps++;
      end
    end
    pauses++;
    press(1'b1);
  end

  // lock-step comparison with the reference
  ref_state_t s;
  real v, maxdiff, vpk;
  int k, pulses, aps, dac_updates, dac_bad;
  bit was_pulse, above;
  real beat_peak[3];
  real beat_plateau[3];
  real beat_end[3];

  function automatic int dac_expect(fix_t x);
    int q = $rtoi($floor(to_real(x) * 256.0 + 0.5));
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    return q + 32768;
  endfunction

  initial begin
    s = rest(-84.0, 2.0e-4);
    k = 0; maxdiff = 0.0; pulses = 0; aps = 0; dac_updates = 0; dac_bad = 0;
    was_pulse = 0; above = 0;
    foreach (beat_peak[b]) begin beat_peak[b] = -200.0; beat_plateau[b] = 0.0; beat_end[b] = 0.0; end
    while (k < NSTEPS) begin
      @(negedge clk);
      if (dac_valid) begin
        // the step just committed used the stimulus of step k
        s = step(s, (k >= 20000 && (k - 20000) % 100000 < 100) ? -80.0 : 0.0, DT_MS);
        dac_updates++;
        if (int'(dac_code) != dac_expect(vm)) dac_bad++;
        v = to_real(vm);
        if (v - s.v > maxdiff) maxdiff = v - s.v;
        if (s.v - v > maxdiff) maxdiff = s.v - v;
        if (k >= 20000) begin
          automatic int b = (k - 20000) / 100000;
          automatic int t = (k - 20000) % 100000;
          if (v > beat_peak[b]) beat_peak[b] = v;
          if (t == 20000) beat_plateau[b] = v;    // 100 ms after the stimulus
          if (t == 79000) beat_end[b] = v;        // 395 ms after the stimulus
        end
        if (!above && v > 0.0) begin above = 1; aps++; end
        if (above && v < -70.0) above = 0;
        k++;
      end
      if (stim_pulse && !was_pulse) pulses++;
      was_pulse = stim_pulse;
    end
    check(dac_updates == NSTEPS, $sformatf("%0d DAC words for %0d steps", dac_updates, NSTEPS));
    check(dac_bad == 0, $sformatf("%0d DAC words differ from Vm", dac_bad));
    check(maxdiff < MAX_DIFF, $sformatf("max |Vm - Vref| = %f mV", maxdiff));
    for (int b = 0; b < 3; b++) begin
      $display("beat %0d: peak %f mV, Vm at +100 ms %f mV, at +395 ms %f mV",
               b, beat_peak[b], beat_plateau[b], beat_end[b]);
      check(beat_peak[b] > 30.0 && beat_peak[b] < 60.0, $sformatf("beat %0d peak", b));
      check(beat_plateau[b] > -20.0 && beat_plateau[b] < 40.0, $sformatf("beat %0d plateau", b));
      check(beat_end[b] < -80.0 && beat_end[b] > -88.0, $sformatf("beat %0d repolarised", b));
    end
    $display("max |Vm - Vref| %f mV; presses %0d, pauses %0d, stimulus pulses %0d, action potentials %0d, DAC updates %0d",
             maxdiff, presses, pauses, pulses, aps, dac_updates);
    check(presses == 2, $sformatf("debounced presses %0d", presses));
    check(pauses == 1 && paused_steps == 0, $sformatf("pause: %0d steps while switched off", paused_steps));
    check(pulses == 3, $sformatf("stimulus pulses %0d", pulses));
    check(aps == 3, $sformatf("action potentials %0d", aps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
