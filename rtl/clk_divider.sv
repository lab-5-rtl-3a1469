// clk_divider: processor clock generator, rate chosen by a switch.
//
// The board clock `clk` (CLK_HZ) is divided to SLOW_HZ when `sel_fast` (SW7)
// is 0 and to FAST_HZ when it is 1.  A half-period counter toggles the
// square wave `sys_clk` (the processor clock as shown on the display); on
// each 0->1 toggle the single-cycle pulse `ce` is raised, and the processor
// advances one clock on that pulse.  The whole design therefore runs from
// the one board clock, with `ce` as a clock enable, instead of a derived
// clock net.  With BYPASS set, `ce` is high on every cycle and `sys_clk`
// toggles every cycle, so a simulation need not wait for the divider.
//
// Changing `sel_fast` takes effect at once: a count past the new limit wraps
// on the next cycle.  `rst` (synchronous) clears the counter and `sys_clk`.
// The 50 MHz input, the ~1 Hz slow rate, the switch and the bypass follow
// the specification; the fast rate (FAST_HZ) is this design's choice.
module clk_divider #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned SLOW_HZ = 1,
  parameter int unsigned FAST_HZ = 100,
  parameter bit          BYPASS  = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic sel_fast,
  output logic ce,
  output logic sys_clk
);

  localparam int unsigned HALF_SLOW = CLK_HZ / (2 * SLOW_HZ);
  localparam int unsigned HALF_FAST = CLK_HZ / (2 * FAST_HZ);
  localparam int unsigned CNT_W     = $clog2(HALF_SLOW + 1);

  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] limit;
  logic             wrap;

  assign limit = sel_fast ? CNT_W'(HALF_FAST - 1) : CNT_W'(HALF_SLOW - 1);
  assign wrap  = BYPASS || (cnt >= limit);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      sys_clk <= 1'b0;
    end else if (wrap) begin
      cnt     <= '0;
      sys_clk <= ~sys_clk;
    end else begin
      cnt     <= cnt + 1'b1;
    end
  end

  // One pulse per processor clock, in the cycle in which sys_clk rises.
  assign ce = BYPASS ? !rst : (wrap && !sys_clk && !rst);

  initial begin
    assert (HALF_FAST >= 1 && HALF_SLOW >= HALF_FAST)
      else $error("clk_divider: rates must satisfy SLOW_HZ <= FAST_HZ <= CLK_HZ/2");
  end

endmodule
