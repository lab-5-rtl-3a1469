// tb_clk_divider: checks the processor clock enable at reduced rates.
//
// With CLK_HZ = 2000, SLOW_HZ = 10 and FAST_HZ = 100 the enable must come
// every 200 board clocks with SW7 = 0 and every 20 with SW7 = 1, as one
// single-cycle pulse while `sys_clk` goes from 0 to 1 (a 50 % square wave).
// A second instance with BYPASS set must enable every cycle.
module tb_clk_divider;
  logic clk = 0, rst, sel_fast;
  logic ce, sys_clk, ce_b, sys_clk_b;
  int   checks = 0, failures = 0;
  int   last_ce, cyc, n_fast = 0, n_slow = 0, n_switch = 0;
  int   high_cnt, total_cnt;

  clk_divider #(.CLK_HZ(2000), .SLOW_HZ(10), .FAST_HZ(100)) dut (
    .clk(clk), .rst(rst), .sel_fast(sel_fast), .ce(ce), .sys_clk(sys_clk));
  clk_divider #(.CLK_HZ(2000), .SLOW_HZ(10), .FAST_HZ(100), .BYPASS(1'b1)) dut_b (
    .clk(clk), .rst(rst), .sel_fast(sel_fast), .ce(ce_b), .sys_clk(sys_clk_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Measure the distance between enables; `prev` tracks the previous sys_clk.
  task automatic measure(int expected_period, int pulses);
    int  n;
    logic prev;
    n = 0; last_ce = -1; high_cnt = 0; total_cnt = 0; prev = sys_clk;
    while (n < pulses) begin
      @(posedge clk); #1;
      cyc++;
      if (last_ce >= 0) begin total_cnt++; if (sys_clk) high_cnt++; end
      if (ce) begin
        checks++;
        if (sys_clk) begin failures++; $display("FAIL ce while sys_clk high"); end
        if (last_ce >= 0) begin
          checks++;
          if (cyc - last_ce != expected_period) begin
            failures++;
            $display("FAIL enable period %0d, expected %0d", cyc - last_ce, expected_period);
          end
        end
        last_ce = cyc; n++;
      end
      prev = sys_clk;
    end
    checks++;
    if (high_cnt * 2 < total_cnt - 2 || high_cnt * 2 > total_cnt + 2) begin
      failures++; $display("FAIL duty %0d of %0d", high_cnt, total_cnt);
    end
  endtask

  initial begin
    cyc = 0;
    rst = 1; sel_fast = 0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (ce || ce_b) begin failures++; $display("FAIL enable during reset"); end
    @(negedge clk) rst = 0;
    measure(200, 6);  n_slow++;
    @(negedge clk) sel_fast = 1; n_switch++;
    @(posedge ce);
    measure(20, 20);  n_fast++;
    @(negedge clk) sel_fast = 0; n_switch++;
    @(posedge ce);
    measure(200, 4);  n_slow++;
    // Bypass: enable every cycle.
    repeat (50) begin
      @(posedge clk); #1;
      checks++;
      if (!ce_b) begin failures++; $display("FAIL bypass enable low"); end
    end
    checks++;
    if (n_slow == 0 || n_fast == 0 || n_switch < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
