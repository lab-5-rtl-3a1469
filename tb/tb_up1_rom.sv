// tb_up1_rom: checks every word of the 128x16 program ROM.
//
// The expected Fibonacci program is written out here as literal machine
// words under the opcode assignment Add=01 Adds=02 Sub=03 Subs=04 And=05
// Com=06 Lw=07 Ldi=08 Sw=09 Jmp=0A Jmpz=0B; every other word must be 0.
module tb_up1_rom;
  import up1_pkg::*;

  logic [6:0] addr;
  word_t      data;
  int         checks = 0, failures = 0;

  up1_rom dut (.addr(addr), .data(data));

  function automatic logic [15:0] expected(int a);
    logic [15:0] prog [32] = '{
      16'h0800, 16'h0000, 16'h0980, 16'h09FF, 16'h0800, 16'h0001, 16'h0981, 16'h09FF,
      16'h0780, 16'h0281, 16'h0982, 16'h0800, 16'h7FFF, 16'h0382, 16'h0B16, 16'h0781,
      16'h0980, 16'h0782, 16'h0981, 16'h09FF, 16'h0A08, 16'h0000, 16'h0781, 16'h09FF,
      16'h0480, 16'h0982, 16'h0B00, 16'h0780, 16'h0981, 16'h0782, 16'h0980, 16'h0A16};
    return (a < 32) ? prog[a] : 16'h0000;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 127; i >= 0; i--) begin
      addr = 7'(i);
      #1;
      checks++;
      if (data !== expected(i)) begin
        failures++;
        $display("FAIL rom[%h] = %h, expected %h", i, data, expected(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
