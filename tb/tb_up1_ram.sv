// tb_up1_ram: checks the 128x16 data RAM: clear start-up contents,
// writes on the clock edge only when `we` is high, and a read that follows
// the address within the cycle.  A shadow array here is the reference.
module tb_up1_ram;
  import up1_pkg::*;

  logic       clk = 0;
  logic       we;
  logic [6:0] addr;
  word_t      d, q;
  word_t      shadow [128];
  int         checks = 0, failures = 0;

  up1_ram dut (.clk(clk), .we(we), .addr(addr), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(string what);
    checks++;
    if (q !== shadow[addr]) begin
      failures++;
      $display("FAIL %s: ram[%h] = %h, expected %h", what, addr, q, shadow[addr]);
    end
  endtask

  initial begin
    foreach (shadow[i]) shadow[i] = '0;
    we = 0; addr = 0; d = 0;
    // Start-up contents are zero.
    for (int i = 0; i < 128; i++) begin
      addr = 7'(i); #1; expect_q("initial");
    end
    // Random writes and reads.
    repeat (2000) begin
      @(negedge clk);
      addr = 7'($urandom);
      d    = word_t'($urandom);
      we   = ($urandom_range(1) == 1);
      #1 expect_q("before edge");         // a write has not happened yet
      @(posedge clk);
      if (we) shadow[addr] = d;
      #1 expect_q("after edge");
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 128; i++) begin
      addr = 7'(i); #1; expect_q("final");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
