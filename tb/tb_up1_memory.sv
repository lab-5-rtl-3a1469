// tb_up1_memory: checks the uP1 address map and the PR output port.
//
// Reads of 0x00-0x7F must return program words (checked against literals),
// writes there must change nothing; 0x80-0xFF must behave as RAM (shadow
// model); a write to 0xFF must land in RAM and in PR; nothing may change in
// a cycle with `ce` low; reset clears PR.
module tb_up1_memory;
  import up1_pkg::*;

  logic  clk = 0, rst, ce, we;
  addr_t addr;
  word_t wdata, rdata, pr;
  word_t ram [128];
  word_t pr_exp;
  int    checks = 0, failures = 0;
  int    n_pr = 0, n_rom_wr = 0, n_ce_low = 0;

  up1_memory dut (.clk(clk), .rst(rst), .ce(ce), .addr(addr), .we(we),
                  .wdata(wdata), .rdata(rdata), .pr(pr));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t rom_exp(addr_t a);
    case (a)
      8'h00: return 16'h0800;  8'h02: return 16'h0980;  8'h05: return 16'h0001;
      8'h0C: return 16'h7FFF;  8'h0E: return 16'h0B16;  8'h1F: return 16'h0A16;
      default: return 16'h0000;
    endcase
  endfunction

  function automatic bit rom_known(addr_t a);
    return a inside {8'h00, 8'h02, 8'h05, 8'h0C, 8'h0E, 8'h1F} || (a >= 8'h20 && a < 8'h80);
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (addr=%h rdata=%h pr=%h)", msg, addr, rdata, pr); end
  endtask

  initial begin
    addr_t probe [6] = '{8'h00, 8'h02, 8'h05, 8'h0C, 8'h0E, 8'h1F};
    foreach (ram[i]) ram[i] = '0;
    pr_exp = '0;
    rst = 1; ce = 1; we = 0; addr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    check(pr == 0, "PR after reset");
    repeat (3000) begin
      @(negedge clk);
      addr  = addr_t'($urandom);
      if ($urandom_range(3) == 0) addr = 8'hFF;
      if ($urandom_range(7) == 0) addr = probe[$urandom_range(5)];
      wdata = word_t'($urandom);
      we    = ($urandom_range(1) == 1);
      ce    = ($urandom_range(3) != 0);
      #1;
      if (addr[7]) check(rdata === ram[addr[6:0]], "RAM read");
      else if (rom_known(addr)) check(rdata === rom_exp(addr), "ROM read");
      @(posedge clk);
      if (we && ce && addr[7]) ram[addr[6:0]] = wdata;
      if (we && ce && addr == 8'hFF) begin pr_exp = wdata; n_pr++; end
      if (we && ce && !addr[7]) n_rom_wr++;
      if (we && !ce) n_ce_low++;
      #1;
      check(pr === pr_exp, "PR value");
      if (addr[7]) check(rdata === ram[addr[6:0]], "RAM after write");
      else if (rom_known(addr)) check(rdata === rom_exp(addr), "ROM unchanged by write");
    end
    check(n_pr > 50 && n_rom_wr > 50 && n_ce_low > 50, "coverage");
    @(negedge clk) rst = 1; @(posedge clk); #1;
    check(pr == 0, "PR cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
