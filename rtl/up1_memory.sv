// up1_memory: the uP1 memory system and its memory-mapped output port.
//
// The 8-bit address bus reaches one 256-word space: bit 7 = 0 selects the
// 128-word instruction ROM (0x00-0x7F), bit 7 = 1 the 128-word data RAM
// (0x80-0xFF).  A read MUX returns the selected memory's word on `rdata`.
// A write (`we` with `ce`) to the RAM half stores `wdata` on the rising
// edge; a write to the ROM half is ignored.  A write to 0xFF also loads the
// 16-bit output register PR, so the word goes to both RAM 0xFF and PR.
// Reading 0xFF returns the RAM copy; PR is output only.
//
// `ce` is the processor clock enable: every register here changes only on a
// rising edge of `clk` with `ce` high.  PR clears on `rst` (synchronous).
// Memory map and PR behaviour follow the uP1 specification; ignoring writes
// to the ROM half is this design's own choice.
module up1_memory
  import up1_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  ce,
  input  addr_t addr,
  input  logic  we,
  input  word_t wdata,
  output word_t rdata,
  output word_t pr
);

  word_t rom_q, ram_q;
  logic  ram_sel;

  assign ram_sel = addr[7];

  up1_rom #(.DEPTH(128)) u_rom (
    .addr (addr[6:0]),
    .data (rom_q)
  );

  up1_ram #(.DEPTH(128)) u_ram (
    .clk  (clk),
    .we   (we && ce && ram_sel),
    .addr (addr[6:0]),
    .d    (wdata),
    .q    (ram_q)
  );

  assign rdata = ram_sel ? ram_q : rom_q;

  always_ff @(posedge clk) begin
    if (rst)                              pr <= '0;
    else if (ce && we && addr == PR_ADDR) pr <= wdata;
  end

endmodule
