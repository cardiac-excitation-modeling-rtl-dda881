// tb_switch_sync - with DB_BITS = 4 (16-cycle debounce): bounces shorter
// than the debounce time must not reach en; a level held for 16 cycles must
// reach en after 2 + 16 cycles (counted exactly); release likewise.
module tb_switch_sync;
  logic clk = 0, rst_n = 0, sw = 0, en;
  int checks = 0, failures = 0;

  switch_sync #(.DB_BITS(4)) dut (.clk, .rst_n, .sw, .en);

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

  int n, glitches;

  task automatic bounce(logic lvl);
    glitches = 0;
    repeat (10) begin
      sw = lvl;
      repeat ($urandom_range(1, 10)) begin @(negedge clk); if (en == lvl) glitches++; end
      sw = !lvl;
      repeat ($urandom_range(1, 5)) begin @(negedge clk); if (en == lvl) glitches++; end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(en == 0, "en low after reset");
    bounce(1'b1);
    check(glitches == 0, "bouncing press does not reach en");
    repeat (30) @(negedge clk);
    sw = 1;
    n = 0;
    while (!en && n < 100) begin @(negedge clk); n++; end
    check(en == 1, "en rises");
    check(n >= 17 && n <= 19, $sformatf("press took %0d cycles", n));
    bounce(1'b0);
    check(glitches == 0, "bouncing release does not reach en");
    sw = 1;
    repeat (30) @(negedge clk);
    check(en == 1, "en still high");
    sw = 0;
    n = 0;
    while (en && n < 100) begin @(negedge clk); n++; end
    check(en == 0 && n >= 17 && n <= 19, $sformatf("release took %0d cycles", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
