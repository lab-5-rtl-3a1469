// up1_datapath: the registers of the uP1 and the ALU between them.
//
// PC (8 bit) counts up or loads the IR address field (jumps).  MAR (8 bit)
// drives the memory address bus and loads, through the MAR MUX, either the
// PC or the IR address field.  IR (16 bit) loads the word on the memory data
// bus; its top byte is the opcode seen by the control unit.  The ALU takes
// A from the accumulator AC and B from the memory data bus; its result Y
// loads AC, and its N and Z outputs load the N and Z flag register at the
// same time, so flags change only with AC (ALU instructions, Lw and Ldi).
//
// Every register changes on a rising edge of `clk` with `ce` high, under
// the control word `ctrl`; `rst` (synchronous) clears them all, so the
// first fetch reads address 0.  The register set and the buses follow the
// uP1 block diagram; the control word encoding is this design's own.
module up1_datapath
  import up1_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  ce,
  input  ctrl_t ctrl,
  input  word_t mem_rdata,   // memory data bus (MDR view)
  output addr_t mar,         // memory address bus
  output word_t ac,          // accumulator, also memory write data
  output addr_t pc,
  output word_t ir,
  output logic  flag_n,
  output logic  flag_z
);

  word_t alu_y;
  logic  alu_n, alu_z;
  addr_t ir_addr;

  assign ir_addr = ir[7:0];

  up1_alu u_alu (
    .op (ctrl.alu_op),
    .a  (ac),
    .b  (mem_rdata),
    .y  (alu_y),
    .n  (alu_n),
    .z  (alu_z)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      pc     <= '0;
      mar    <= '0;
      ir     <= '0;
      ac     <= '0;
      flag_n <= 1'b0;
      flag_z <= 1'b0;
    end else if (ce) begin
      if (ctrl.pc_ld)       pc <= ir_addr;
      else if (ctrl.pc_inc) pc <= pc + 8'd1;
      if (ctrl.mar_ld)      mar <= ctrl.mar_sel ? ir_addr : pc;
      if (ctrl.ir_ld)       ir <= mem_rdata;
      if (ctrl.ac_ld) begin
        ac     <= alu_y;
        flag_n <= alu_n;
        flag_z <= alu_z;
      end
    end
  end

endmodule
