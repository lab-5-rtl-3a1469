// up1_pkg: types and constants shared by the uP1 processor, its memory and
// its test benches.
//
// The uP1 is a 16-bit accumulator machine with one 256-word address space.
// An instruction word is {opcode[15:8], address[7:0]}.  The instruction set
// (Add, Adds, Sub, Subs, And, Com, Lw, Ldi, Sw, Jmp, Jmpz) and the word
// format follow the uP1 specification; the numeric opcode values are this
// design's own choice, since the specification leaves them to be assigned
// per implementation.  Any opcode not listed below executes as a no-op.
//
// fib_program() returns the Fibonacci test program, word by word, encoded
// with these opcodes.  The ROM and the test benches both use it.
package up1_pkg;

  localparam int unsigned DATA_W = 16;
  localparam int unsigned ADDR_W = 8;

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef enum logic [7:0] {
    OP_ADD  = 8'h01,
    OP_ADDS = 8'h02,
    OP_SUB  = 8'h03,
    OP_SUBS = 8'h04,
    OP_AND  = 8'h05,
    OP_COM  = 8'h06,
    OP_LW   = 8'h07,
    OP_LDI  = 8'h08,
    OP_SW   = 8'h09,
    OP_JMP  = 8'h0A,
    OP_JMPZ = 8'h0B
  } opcode_e;

  // Operation selected in the ALU.
  typedef enum logic [2:0] {
    ALU_PASSB = 3'd0,  // Y = B             (Lw, Ldi)
    ALU_ADD   = 3'd1,  // Y = A + B
    ALU_ADDS  = 3'd2,  // Y = A + B, signed saturation
    ALU_SUB   = 3'd3,  // Y = A - B
    ALU_SUBS  = 3'd4,  // Y = A - B, signed saturation
    ALU_AND   = 3'd5,  // Y = A & B
    ALU_COM   = 3'd6   // Y = ~A
  } alu_op_e;

  // Control unit states: one fetch cycle, one decode cycle, one execute
  // cycle (jumps and no-ops finish in decode).
  typedef enum logic [1:0] {
    S_FETCH  = 2'd0,
    S_DECODE = 2'd1,
    S_EXEC   = 2'd2
  } state_e;

  // Control word driven by the control unit into the datapath.
  typedef struct packed {
    logic    ir_ld;     // IR <- memory data
    logic    pc_inc;    // PC <- PC + 1
    logic    pc_ld;     // PC <- IR address field
    logic    mar_ld;    // MAR <- MAR MUX
    logic    mar_sel;   // MAR MUX: 0 = PC (or PC+1 when pc_inc), 1 = IR address field
    logic    ac_ld;     // AC <- ALU Y, N/Z flags <- ALU N/Z
    alu_op_e alu_op;
    logic    mem_we;    // write AC to M[MAR]
  } ctrl_t;

  localparam addr_t PR_ADDR = 8'hFF;

  function automatic word_t instr(opcode_e op, addr_t a);
    return {op, a};
  endfunction

  // Fibonacci test program: ascending sequence up to 0x7FFF, then
  // descending back to 0, forever.  RAM 0x80 = low, 0x81 = high,
  // 0x82 = new number, 0xFF = PR display port.
  function automatic word_t fib_program(int unsigned addr);
    case (addr)
      'h00: return instr(OP_LDI, 8'h00);
      'h01: return 16'h0000;
      'h02: return instr(OP_SW, 8'h80);
      'h03: return instr(OP_SW, 8'hFF);
      'h04: return instr(OP_LDI, 8'h00);
      'h05: return 16'h0001;
      'h06: return instr(OP_SW, 8'h81);
      'h07: return instr(OP_SW, 8'hFF);
      'h08: return instr(OP_LW, 8'h80);
      'h09: return instr(OP_ADDS, 8'h81);
      'h0A: return instr(OP_SW, 8'h82);
      'h0B: return instr(OP_LDI, 8'h00);
      'h0C: return 16'h7FFF;
      'h0D: return instr(OP_SUB, 8'h82);
      'h0E: return instr(OP_JMPZ, 8'h16);
      'h0F: return instr(OP_LW, 8'h81);
      'h10: return instr(OP_SW, 8'h80);
      'h11: return instr(OP_LW, 8'h82);
      'h12: return instr(OP_SW, 8'h81);
      'h13: return instr(OP_SW, 8'hFF);
      'h14: return instr(OP_JMP, 8'h08);
      'h16: return instr(OP_LW, 8'h81);
      'h17: return instr(OP_SW, 8'hFF);
      'h18: return instr(OP_SUBS, 8'h80);
      'h19: return instr(OP_SW, 8'h82);
      'h1A: return instr(OP_JMPZ, 8'h00);
      'h1B: return instr(OP_LW, 8'h80);
      'h1C: return instr(OP_SW, 8'h81);
      'h1D: return instr(OP_LW, 8'h82);
      'h1E: return instr(OP_SW, 8'h80);
      'h1F: return instr(OP_JMP, 8'h16);
      default: return 16'h0000;
    endcase
  endfunction

endpackage
