// tb_up1_system_full: the uP1 computer at its default parameters (50 MHz
// board clock, 1 Hz / 100 Hz processor clock, 640x480 VGA, 1 kHz digit
// scan), with SW7 = 1.
//
// The bench runs the Fibonacci program until it has written PR three
// times (0, 1, 1: about 50 processor clocks, 25 million board clocks).  It
// checks the processor clock period (500000 board clocks), each PR value,
// the four seven-segment digits showing PR after each write, the VGA line
// and frame periods (1600 and 840000 board clocks), and the instruction
// lengths seen at the processor's own clock.
module tb_up1_system_full;
  import up1_pkg::*;

  logic        clk = 0, rst, sw7;
  logic [6:0]  seg_n;
  logic        dp_n;
  logic [3:0]  an_n;
  logic        hs, vs;
  logic [2:0]  rgb;
  logic [15:0] pr;
  int          checks = 0, failures = 0;

  up1_system dut (.clk(clk), .rst(rst), .sw7(sw7), .seg_n(seg_n), .dp_n(dp_n), .an_n(an_n),
                  .vga_hs(hs), .vga_vs(vs), .vga_rgb(rgb), .pr(pr));

  always #10 clk = ~clk;   // 50 MHz

  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [3:0] seg_digit(logic [6:0] s);
    logic [6:0] pats [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                              7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
    for (int i = 0; i < 16; i++) if (~s == pats[i]) return 4'(i);
    return 4'hF;
  endfunction

  // Reads the four digits off the multiplexed display (one full scan).
  task automatic read_display(output logic [15:0] v);
    bit [3:0] seen = 0;
    v = 0;
    while (seen != 4'hF) begin
      @(posedge clk); #1;
      for (int d = 0; d < 4; d++)
        if (an_n == ~(4'b0001 << d)) begin v[4*d +: 4] = seg_digit(seg_n); seen[d] = 1; end
    end
  endtask

  // Processor clocks, counted when the clock enable is used.
  int  ce_count = 0;
  longint last_ce = -1;
  int  bad_period = 0;
  always @(posedge clk) if (dut.cpu_ce) begin
    if (last_ce >= 0 && cyc - last_ce != 500_000) bad_period++;
    last_ce = cyc;
    ce_count++;
  end

  // VGA sync periods.
  longint last_hs = -1, last_vs = -1;
  int     bad_hs = 0, bad_vs = 0, n_lines = 0, n_frames = 0;
  always @(negedge hs) begin
    if (last_hs >= 0 && cyc - last_hs != 1600) bad_hs++;
    last_hs = cyc; n_lines++;
  end
  always @(negedge vs) begin
    if (last_vs >= 0 && cyc - last_vs != 840_000) bad_vs++;
    last_vs = cyc; n_frames++;
  end

  initial begin
    int  expected [3] = '{0, 1, 1};
    logic [15:0] shown;
    rst = 1; sw7 = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 3; i++) begin
      // wait for a store to the PR address
      do @(posedge clk); while (!(dut.cpu_ce && dut.u_cpu.mem_we && dut.u_cpu.mar == PR_ADDR));
      @(posedge clk); #1;
      check(pr == 16'(expected[i]), $sformatf("PR write %0d: %h, expected %0d", i, pr, expected[i]));
      read_display(shown);
      check(shown == 16'(expected[i]), $sformatf("display shows %h after write %0d", shown, i));
    end
    $display("processor clocks %0d, board clocks %0d, VGA lines %0d, frames %0d",
             ce_count, cyc, n_lines, n_frames);
    check(ce_count == 50, $sformatf("50 processor clocks to the third PR write, saw %0d", ce_count));
    check(bad_period == 0, "processor clock period 500000 board clocks");
    check(bad_hs == 0 && n_lines > 1000, "VGA line period");
    check(bad_vs == 0 && n_frames > 10, "VGA frame period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
