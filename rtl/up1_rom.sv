// up1_rom: 128x16 instruction ROM of the uP1, mapped at addresses 0x00-0x7F.
//
// The contents are the Fibonacci test program, filled in at elaboration
// from up1_pkg::fib_program(); unused words read as 0x0000.  The read is
// asynchronous (distributed-ROM style): the word at `addr` appears at `data`
// within the same clock cycle, so a register loaded from MAR on one edge has
// its data stable at the IR's D inputs well before the next edge.
module up1_rom
  import up1_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output word_t                    data
);

  word_t mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = fib_program(i);
  end

  assign data = mem[addr];

endmodule
