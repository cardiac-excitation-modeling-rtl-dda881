// tb_ap_dac_format - loads random membrane voltages and checks the 16-bit
// offset-binary code against round(Vm*256) + 32768 computed in the
// testbench, saturation at both ends, the one-cycle valid strobe and that the
// code holds between loads.
module tb_ap_dac_format;
  import lr1_pkg::*;

  logic clk = 0, rst_n = 0, load = 0;
  fix_t vm;
  logic [15:0] code;
  logic valid;
  int checks = 0, failures = 0;

  ap_dac_format dut (.clk, .rst_n, .load, .vm, .code, .valid);

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

  function automatic int expect_code(real v);
    int q = $rtoi($floor(v * 256.0 + 0.5));
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    return q + 32768;
  endfunction

  real v;
  logic [15:0] held;

  initial begin
    vm = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(code == 16'h8000 && !valid, "reset state");
    for (int n = 0; n < 300; n++) begin
      case (n)
        0: v = 0.0;
        1: v = 127.99;
        2: v = 200.0;
        3: v = -128.0;
        4: v = -300.0;
        5: v = -84.0;
        default: v = -130.0 + 260.0 * real'($urandom_range(0, 1000000)) / 1.0e6;
      endcase
      vm = to_fix(v);
      load = 1; @(negedge clk); load = 0;
      check(valid, "valid after load");
      check(int'(code) == expect_code(to_real(vm)), $sformatf("v=%f code %0d want %0d", v, code, expect_code(to_real(vm))));
      held = code;
      vm = to_fix(-v);
      @(negedge clk);
      check(!valid && code == held, "code holds without load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
