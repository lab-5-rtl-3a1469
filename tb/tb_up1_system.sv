// tb_up1_system: end-to-end test of the uP1 computer.
//
// Instance `fast` bypasses the clock divider, so the processor steps on
// every board clock; its nominal board clock is scaled to 4 kHz so that the
// seven-segment scan (4 clocks per digit) keeps pace.  It runs the Fibonacci program through two complete
// ascending/descending sweeps; every write to the PR port is compared with
// the Fibonacci sequence computed here, and the seven-segment outputs are
// decoded and compared with PR whenever PR has been stable for a full scan.
//
// Instance `slow` keeps the divider (scaled: 4 MHz board clock, 1 Hz and
// 2 Hz processor clocks), so the processor state is stable for longer than
// a VGA frame.  The bench switches SW7, checks both processor clock
// periods, and reads a whole VGA frame back from the rgb, hs and vs pins:
// the register lines must show the processor's PC, IR, MAR, MDR, AC, PR, Z
// and CLK.
//
// Mechanisms counted (each must occur): saturating add, Jmpz taken,
// Jmpz not taken, Jmp, Ldi, store to PR, restart from the top, SW7 rate
// switch, VGA frame, seven-segment scan of all four digits.
module tb_up1_system;
  import up1_pkg::*;

  logic        clk = 0, rst;
  logic        sw7_slow;
  logic [6:0]  seg_n_f, seg_n_s;
  logic        dp_n_f, dp_n_s;
  logic [3:0]  an_n_f, an_n_s;
  logic        hs_f, vs_f, hs_s, vs_s;
  logic [2:0]  rgb_f, rgb_s;
  logic [15:0] pr_f, pr_s;
  int          checks = 0, failures = 0;

  int n_sat = 0, n_jz_t = 0, n_jz_n = 0, n_jmp = 0, n_ldi = 0, n_prw = 0, n_restart = 0;
  int n_switch = 0, n_frame = 0, n_scan = 0;

  up1_system #(.CLK_HZ(4000), .BYPASS_DIV(1'b1)) fast (
    .clk(clk), .rst(rst), .sw7(1'b0), .seg_n(seg_n_f), .dp_n(dp_n_f), .an_n(an_n_f),
    .vga_hs(hs_f), .vga_vs(vs_f), .vga_rgb(rgb_f), .pr(pr_f));

  up1_system #(.CLK_HZ(4_000_000), .SLOW_HZ(1), .FAST_HZ(2)) slow (
    .clk(clk), .rst(rst), .sw7(sw7_slow), .seg_n(seg_n_s), .dp_n(dp_n_s), .an_n(an_n_s),
    .vga_hs(hs_s), .vga_vs(vs_s), .vga_rgb(rgb_s), .pr(pr_s));

  char_rom u_ref (.code(ref_code), .row(ref_row), .pixels(ref_pixels));
  logic [7:0] ref_code;
  logic [2:0] ref_row;
  logic [7:0] ref_pixels;

  always #5 clk = ~clk;

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  // ---------------------------------------------------------------- fast
  int expected [$];
  int pr_idx = 0;
  int sweeps = 0;

  initial begin
    int a = 0, b = 1;
    expected.push_back(0); expected.push_back(1);
    while (a + b <= 32767) begin expected.push_back(a + b); {a, b} = {b, a + b}; end
    while (1) begin
      expected.push_back(b);
      if (b - a == 0) break;
      {a, b} = {b - a, a};
    end
  end

  // Watch the fast processor's control word and count what it does.
  always @(posedge clk) if (!rst && fast.cpu_ce) begin
    if (fast.u_cpu.state == S_EXEC) begin
      if (fast.u_cpu.ir[15:8] == OP_ADDS && fast.u_cpu.u_dp.alu_y == 16'h7FFF
          && fast.u_cpu.ac != 16'h7FFF) n_sat++;
      if (fast.u_cpu.ir[15:8] == OP_LDI) n_ldi++;
      if (fast.u_cpu.mem_we && fast.u_cpu.mar == PR_ADDR) begin
        n_prw++;
        check(fast.u_cpu.ac == 16'(expected[pr_idx]),
              $sformatf("PR write %0d = %0d, expected %0d", pr_idx, fast.u_cpu.ac, expected[pr_idx]));
        pr_idx++;
        if (pr_idx == expected.size()) begin pr_idx = 0; sweeps++; end
      end
    end
    if (fast.u_cpu.state == S_DECODE) begin
      if (fast.u_cpu.ir[15:8] == OP_JMP) n_jmp++;
      if (fast.u_cpu.ir[15:8] == OP_JMPZ) begin
        if (fast.u_cpu.flag_z) n_jz_t++; else n_jz_n++;
        if (fast.u_cpu.flag_z && fast.u_cpu.ir[7:0] == 8'h00) n_restart++;
      end
    end
  end

  function automatic logic [3:0] seg_digit(logic [6:0] seg_n);
    logic [6:0] pats [16] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
                              7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71};
    for (int i = 0; i < 16; i++) if (~seg_n == pats[i]) return 4'(i);
    return 4'hx;
  endfunction

  // ---------------------------------------------------------------- slow
  logic [2:0] frame [480][640];

  // Captures one frame from the pins: waits for the vsync pulse, then
  // counts hsync pulses and pixels like a monitor would.
  task automatic capture_frame();
    int line, px;
    @(negedge vs_s);
    @(posedge vs_s);
    // back porch of 33 lines, then 480 visible lines
    line = -33;
    while (line < 480) begin
      @(negedge hs_s);
      @(posedge hs_s);
      line++;
      if (line >= 0 && line < 480) begin
        // back porch of 48 pixels after hsync, 2 clocks per pixel
        repeat (48 * 2) @(posedge clk);
        for (px = 0; px < 640; px++) begin
          @(posedge clk); #1;
          frame[line][px] = rgb_s;
          @(posedge clk);
        end
      end
    end
    n_frame++;
  endtask

  function automatic string hex(logic [15:0] v, int n);
    string s = "";
    for (int i = n - 1; i >= 0; i--) s = {s, $sformatf("%h", v[4*i +: 4])};
    return s.toupper();
  endfunction

  task automatic check_text(int r, string text);
    int bad = 0;
    for (int c = 0; c < text.len(); c++) begin
      ref_code = text[c];
      for (int py = 0; py < 8; py++) begin
        ref_row = 3'(py); #1;
        for (int px = 0; px < 8; px++)
          if (frame[16*r + 2*py][16*c + 2*px] !== (ref_pixels[7 - px] ? 3'b111 : 3'b001)) bad++;
      end
    end
    check(bad == 0, $sformatf("screen row %0d should read \"%s\" (%0d pixels differ)", r, text, bad));
  endtask

  initial begin
    rst = 1; sw7_slow = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;

    fork
      // Fast instance: two sweeps, seven-segment readback.
      begin
        while (sweeps < 2) begin
          @(posedge clk);
        end
        check(1, "");
      end
      begin
        // Seven-segment: the fast PR changes quickly, so compare the digit
        // shown with the PR value 2 clocks earlier (registered outputs).
        logic [15:0] pr_d1, pr_d2;
        bit [3:0] seen = 0;
        while (sweeps < 2) begin
          @(posedge clk); #1;
          if (an_n_f != 4'hF) begin
            int d;
            d = (an_n_f == 4'b1110) ? 0 : (an_n_f == 4'b1101) ? 1 : (an_n_f == 4'b1011) ? 2 : 3;
            if ($countones(~an_n_f) == 1 && pr_d1 == pr_d2) begin
              seen[d] = 1;
              checks++;
              if (seg_digit(seg_n_f) !== pr_d1[4*d +: 4]) begin
                failures++;
                if (failures < 20) $display("FAIL seven-segment digit %0d: %b for %h", d, seg_n_f, pr_d1);
              end
            end
            if (seen == 4'hF) begin n_scan++; seen = 0; end
          end
          pr_d2 = pr_d1; pr_d1 = pr_f;
        end
      end
      // Slow instance: processor clock periods and a frame read back.
      begin
        int t0, t1, t2;
        @(posedge slow.cpu_ce); t0 = $time;
        @(posedge slow.cpu_ce); t1 = $time;
        check((t1 - t0) == 10 * 4_000_000, $sformatf("SW7=0 period %0d ns", t1 - t0));
        sw7_slow = 1; n_switch++;
        @(posedge slow.cpu_ce);
        @(posedge slow.cpu_ce); t1 = $time;
        @(posedge slow.cpu_ce); t2 = $time;
        check((t2 - t1) == 10 * 2_000_000, $sformatf("SW7=1 period %0d ns", t2 - t1));
        // After a processor step, the wait for the next vsync and a whole
        // frame (at most 2 x 840000 clocks) fit before the next step
        // (2000000 clocks).
        begin
          logic [7:0]  pc_v, mar_v;
          logic [15:0] ir_v, mdr_v, ac_v, pr_v;
          logic        z_v, clk_v;
          // cpu_ce is high in the cycle before the edge that steps the processor
          @(posedge slow.cpu_ce); @(posedge clk); #1;
          pc_v = slow.u_cpu.pc; ir_v = slow.u_cpu.ir; mar_v = slow.u_cpu.mar;
          mdr_v = slow.u_cpu.mdr; ac_v = slow.u_cpu.ac; pr_v = slow.u_cpu.pr;
          z_v = slow.u_cpu.flag_z; clk_v = slow.cpu_clk;
          capture_frame();
          check(slow.u_cpu.pc == pc_v, "processor held still during the frame");
          check_text(0, " UP1 COMPUTER");
          check_text(1, " VIDEO REGISTER VIEW");
          check_text(3, {" PC   ", hex(16'(pc_v), 2)});
          check_text(4, {" IR   ", hex(ir_v, 4)});
          check_text(5, {" MAR  ", hex(16'(mar_v), 2)});
          check_text(6, {" MDR  ", hex(mdr_v, 4)});
          check_text(7, {" AC   ", hex(ac_v, 4)});
          check_text(8, {" PR   ", hex(pr_v, 4)});
          check_text(9, {" Z    ", z_v ? "1" : "0"});
        end
      end
    join

    $display("saturations %0d, jmpz taken %0d / not %0d, jmp %0d, ldi %0d, PR writes %0d, restarts %0d",
             n_sat, n_jz_t, n_jz_n, n_jmp, n_ldi, n_prw, n_restart);
    $display("SW7 switches %0d, VGA frames %0d, seven-segment scans %0d", n_switch, n_frame, n_scan);
    check(n_sat > 0, "saturation seen");
    check(n_jz_t > 0, "Jmpz taken seen");
    check(n_jz_n > 0, "Jmpz not taken seen");
    check(n_jmp > 0, "Jmp seen");
    check(n_ldi > 0, "Ldi seen");
    check(n_prw > 0, "PR write seen");
    check(n_restart > 0, "restart seen");
    check(n_switch > 0, "SW7 switch seen");
    check(n_frame > 0, "VGA frame seen");
    check(n_scan > 0, "seven-segment scan seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
