// tb_step_ctrl - checks the phase sequencer at STEP_CYCLES = 10 (three idle
// cycles per step): exactly one phase per cycle in order 0..6, then idle
// cycles; one step every 10 clocks; step_done in phase 6; steps counts
// commits; a step in progress completes when run falls, and no new step
// starts until run rises again.
module tb_step_ctrl;
  import lr1_pkg::*;

  localparam int SC = 10;

  logic clk = 0, rst_n = 0, run = 0;
  phase_t ph;
  logic step_done;
  logic [31:0] steps;
  int checks = 0, failures = 0;

  step_ctrl #(.STEP_CYCLES(SC)) dut (.clk, .rst_n, .run, .ph, .step_done, .steps);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n, stopped_phases;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(ph == '0 && steps == 0, "idle after reset");
    run = 1;
    @(negedge clk);
    for (int s = 0; s < 20; s++) begin
      for (int c = 0; c < SC; c++) begin
        if (c < NPH) check(ph == phase_t'(1 << c), $sformatf("step %0d cycle %0d ph %b", s, c, ph));
        else         check(ph == '0, $sformatf("idle cycle %0d ph %b", c, ph));
        check(step_done == (c == PH_COMMIT), "step_done in the commit phase");
        if (s == 19 && c == 2) run = 0;    // drop run in the middle of a step
        @(negedge clk);
      end
      check(steps == s + 1, $sformatf("steps %0d after %0d", steps, s + 1));
    end
    stopped_phases = 0;
    repeat (50) begin
      if (ph != '0) stopped_phases++;
      @(negedge clk);
    end
    check(stopped_phases == 0, "no phases while run is low");
    check(steps == 20, "step counter stopped");
    run = 1;
    n = 0;
    while (!step_done && n < 40) begin @(negedge clk); n++; end
    check(steps == 20 && step_done, "a new step starts when run rises");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
