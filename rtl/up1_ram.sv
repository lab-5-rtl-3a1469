// up1_ram: 128x16 data RAM of the uP1, mapped at addresses 0x80-0xFF.
//
// One port, with a synchronous write and an asynchronous read (the
// behaviour of FPGA distributed RAM): when `we` is high, `d` is written to
// word `addr` on the rising clock edge; `q` always shows the word at `addr`.
// Address and data come from registers (MAR and AC) that are stable for the
// whole write cycle, which meets the setup and hold times of the write.
// The contents are cleared at start-up; there is no reset of the array.
module up1_ram
  import up1_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  word_t                    d,
  output word_t                    q
);

  word_t mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= d;
  end

  assign q = mem[addr];

endmodule
