// tb_up1_cpu: runs the uP1 processor against the instruction-level model.
//
// Phase 1 runs the Fibonacci program from the ROM for a whole ascending and
// descending sweep and back to the start.  Phase 2 loads random programs
// (valid opcodes, random addresses, a few unknown opcodes) into the ROM and
// random data into the RAM through hierarchical writes, and runs them.
// Before every instruction fetch the bench compares PC, MAR, AC, Z and PR
// with the model, and it checks that each instruction takes the expected
// number of processor clocks (3, or 2 for jumps and no-ops).  The clock
// enable is dropped at random; the processor must simply wait.
`include "up1_iss.svh"
module tb_up1_cpu;
  import up1_pkg::*;
  import up1_iss_pkg::*;

  logic   clk = 0, rst, ce;
  addr_t  pc, mar;
  word_t  ir, mdr, ac, pr;
  logic   flag_n, flag_z, mem_we;
  state_e state;

  iss_t   s;
  int     checks = 0, failures = 0;
  int     n_sat = 0, n_jmpz_taken = 0, n_jmpz_not = 0, n_pr = 0, n_restart = 0;
  int     n_rom_wr = 0, n_op [256];
  logic [15:0] pr_seq [$];

  up1_cpu dut (.clk(clk), .rst(rst), .ce(ce), .pc(pc), .ir(ir), .mar(mar), .mdr(mdr),
               .ac(ac), .pr(pr), .flag_n(flag_n), .flag_z(flag_z), .state(state),
               .mem_we(mem_we));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: pc=%h/%h mar=%h ac=%h/%h z=%b/%b pr=%h/%h", msg, pc, s.pc, mar,
                 ac, s.ac, flag_z, s.z, pr, s.pr);
    end
  endtask

  task automatic do_reset();
    ce = 1; rst = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    reset(s);
  endtask

  // Runs `count` instructions, checking each against the model.
  task automatic run(int count, bit random_ce);
    event_t e;
    int     cyc;
    for (int i = 0; i < count; i++) begin
      check(state == S_FETCH, "at fetch");
      check(pc == s.pc && mar == s.pc && ac == s.ac && flag_z == s.z && flag_n == s.n
            && pr == s.pr, "registers");
      e = step(s);
      n_op[e.op]++;
      if (e.saturated) n_sat++;
      if (e.op == 8'h0B) begin if (e.jumped) n_jmpz_taken++; else n_jmpz_not++; end
      if (e.pr_write) begin n_pr++; pr_seq.push_back(s.pr); end
      if (e.jumped && s.pc == 0) n_restart++;
      if (e.rom_write) n_rom_wr++;
      cyc = 0;
      do begin
        ce = random_ce ? ($urandom_range(3) != 0) : 1'b1;
        @(posedge clk);
        if (ce) cyc++;
        @(negedge clk);
      end while (!(state == S_FETCH && ce) && cyc < 10);
      // state is FETCH again after the last enabled edge of the instruction
      check(cyc == e.cycles, $sformatf("cycle count %0d, expected %0d (op %h)", cyc, e.cycles, e.op));
      ce = 1;
    end
  endtask

  initial begin
    word_t prog [128];
    // Phase 1: the Fibonacci program.
    for (int i = 0; i < 256; i++) s.mem[i] = (i < 128) ? fib_program(i) : 16'h0000;
    do_reset();
    run(1400, 1'b1);
    // The PR sequence: 0 1 1 2 3 5 ... 28657, then 28657 17711 ... down to 1 0, then again.
    begin
      int a = 0, b = 1;
      bit ok = 1;
      int expected [$];
      expected.push_back(0); expected.push_back(1);
      while (a + b <= 32767) begin expected.push_back(a + b); {a, b} = {b, a + b}; end
      // descending: b, a, b - a, ...
      while (1) begin
        expected.push_back(b);
        if (b - a == 0) break;
        {a, b} = {b - a, a};
      end
      for (int i = 0; i < expected.size() && i < pr_seq.size(); i++)
        if (pr_seq[i] != 16'(expected[i])) ok = 0;
      check(ok && pr_seq.size() > expected.size(), "Fibonacci PR sequence");
      $display("PR writes: %0d, first sweep %0d values", pr_seq.size(), expected.size());
    end

    // Phase 2: random programs.
    for (int t = 0; t < 20; t++) begin
      logic [7:0] ops [12] = '{8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08,
                               8'h09, 8'h0A, 8'h0B, 8'h00};
      for (int i = 0; i < 128; i++) begin
        logic [7:0] op, ad;
        op = ops[$urandom_range(11)];
        if ($urandom_range(30) == 0) op = 8'($urandom_range(255, 12));
        ad = 8'($urandom);
        if (op == 8'h09 && $urandom_range(3) == 0) ad = 8'hFF;
        if ((op == 8'h0A || op == 8'h0B) && $urandom_range(1) == 0) ad = 8'($urandom_range(127));
        prog[i] = (op == 8'h08 || $urandom_range(7) != 0) ? {op, ad} : word_t'($urandom);
        dut.u_mem.u_rom.mem[i] = prog[i];
        s.mem[i] = prog[i];
      end
      for (int i = 128; i < 256; i++) begin
        word_t v;
        v = ($urandom_range(3) == 0) ? 16'h7FFF + 16'($urandom_range(2)) : word_t'($urandom);
        dut.u_mem.u_ram.mem[i - 128] = v;
        s.mem[i] = v;
      end
      do_reset();
      run(300, t[0]);
    end

    $display("saturations %0d, jmpz taken %0d, not taken %0d, PR writes %0d, restarts %0d, ROM writes %0d",
             n_sat, n_jmpz_taken, n_jmpz_not, n_pr, n_restart, n_rom_wr);
    check(n_sat > 0 && n_jmpz_taken > 0 && n_jmpz_not > 0 && n_pr > 0 && n_restart > 0
          && n_rom_wr > 0, "every mechanism exercised");
    for (int o = 1; o <= 11; o++) check(n_op[o] > 0, $sformatf("opcode %h executed", o));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
