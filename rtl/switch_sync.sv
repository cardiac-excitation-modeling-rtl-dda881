// switch_sync - enable switch input conditioning.
//
// The board switch is asynchronous to the solver clock and bounces.  Two
// flip-flops bring it into the clock domain; the output then follows the
// synchronised level only after it has been stable for 2^DB_BITS clock
// cycles (65536 cycles, 2.8 ms at 23.6 MHz by default).
//
// Interface: sw is the raw switch, en the clean level; reset clears en.
// A single-bit enable switch is the design's; the synchroniser and the
// debounce counter are choices of this implementation.
module switch_sync #(
  parameter int DB_BITS = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sw,
  output logic en
);
  logic             s1, s2;
  logic [DB_BITS:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1  <= 1'b0;
      s2  <= 1'b0;
      cnt <= '0;
      en  <= 1'b0;
    end else begin
      s1 <= sw;
      s2 <= s1;
      if (s2 == en) begin
        cnt <= '0;
      end else if (cnt == (DB_BITS+1)'((1 << DB_BITS) - 1)) begin
        en  <= s2;
        cnt <= '0;
      end else begin
        cnt <= cnt + 1;
      end
    end
  end
endmodule
