// tb_stimulus - advances the stimulus generator step by step (with reduced
// onset, period and width) and compares the pulse and Iext against a
// reference computed from the step number: pulse when k >= START and
// (k - START) mod PERIOD < WIDTH, Iext = -stim_amp (8 fraction bits).
// Counts the pulses seen and checks that the state moves only on adv.
module tb_stimulus;
  import lr1_pkg::*;

  localparam int START = 7, PERIOD = 23, WIDTH = 4;

  logic clk = 0, rst_n = 0, adv = 0;
  logic [14:0] stim_amp;
  fix_t iext;
  logic pulse;
  int checks = 0, failures = 0;

  stimulus #(.START_STEPS(START), .PERIOD_STEPS(PERIOD), .WIDTH_STEPS(WIDTH)) dut (
    .clk, .rst_n, .adv, .stim_amp, .iext, .pulse
  );

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

  bit want;
  int pulses;
  bit prev;

  initial begin
    stim_amp = 15'd20480;    // 80 uA/cm^2
    repeat (2) @(negedge clk);
    rst_n = 1;
    pulses = 0; prev = 0;
    for (int k = 0; k < 200; k++) begin
      want = (k >= START) && (((k - START) % PERIOD) < WIDTH);
      if (k == 150) stim_amp = 15'h7fff;   // full scale, 127.996 uA/cm^2
      @(negedge clk);
      check(pulse == want, $sformatf("step %0d pulse %0d want %0d", k, pulse, want));
      check(iext == (want ? to_fix(-real'(stim_amp) / 256.0) : '0), $sformatf("step %0d iext %f", k, to_real(iext)));
      if (pulse && !prev) pulses++;
      prev = pulse;
      // idle cycles without adv must not move the generator
      repeat ($urandom_range(0, 3)) @(negedge clk);
      check(pulse == want, "pulse stable without adv");
      adv = 1; @(negedge clk); adv = 0;
    end
    check(pulses == 9, $sformatf("%0d pulses in 200 steps, expected 9", pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
