// up1_control: the uP1 control unit, a three-state machine.
//
//   FETCH   IR <- M[MAR]; PC <- PC + 1.  The same for every instruction.
//           MAR already holds the instruction address, loaded one cycle
//           earlier, so the memory word is stable at the IR inputs for a
//           whole clock period before the IR clocks it in.
//   DECODE  Opcode-dependent.  Memory-operand instructions load MAR with
//           the IR address field.  Ldi loads MAR with PC (the immediate word)
//           and increments PC past it.  Jmp, and Jmpz with Z = 1, load PC and
//           MAR with the address field and finish here, so jumps take two
//           cycles; Jmpz with Z = 0, Com and unknown opcodes load MAR with PC.
//   EXEC    ALU instructions, Lw and Ldi load AC (and the N/Z flags) with the
//           ALU result; Com complements AC; Sw writes AC to M[MAR].  All load
//           MAR with PC so the next fetch address is ready.
//
// Instruction lengths: Jmp/Jmpz/no-op 2 cycles, all others 3 cycles.
// FETCH outputs are Moore (state only); DECODE and EXEC outputs are Mealy,
// depending also on the opcode (and Z for Jmpz), both of which are
// registers, so there is no combinational path from outside.  The
// state advances on a rising edge of `clk` with `ce` high; `rst` returns to
// FETCH.  The fetch/decode/execute split follows the uP1 specification; the
// exact cycle assignment and the one-cycle store are this design's choice.
module up1_control
  import up1_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   ce,
  input  logic [7:0] opcode,
  input  logic   flag_z,
  output ctrl_t  ctrl,
  output state_e state
);

  state_e next;

  always_ff @(posedge clk) begin
    if (rst)     state <= S_FETCH;
    else if (ce) state <= next;
  end

  always_comb begin
    ctrl   = '0;
    ctrl.alu_op = ALU_PASSB;
    next   = S_FETCH;
    unique case (state)
      S_FETCH: begin
        ctrl.ir_ld  = 1'b1;
        ctrl.pc_inc = 1'b1;
        next        = S_DECODE;
      end
      S_DECODE: begin
        ctrl.mar_ld = 1'b1;
        case (opcode)
          OP_ADD, OP_ADDS, OP_SUB, OP_SUBS, OP_AND, OP_LW, OP_SW: begin
            ctrl.mar_sel = 1'b1;
            next         = S_EXEC;
          end
          OP_LDI: begin
            ctrl.pc_inc = 1'b1;
            next        = S_EXEC;
          end
          OP_COM: next = S_EXEC;
          OP_JMP: begin
            ctrl.mar_sel = 1'b1;
            ctrl.pc_ld   = 1'b1;
          end
          OP_JMPZ: begin
            ctrl.mar_sel = flag_z;
            ctrl.pc_ld   = flag_z;
          end
          default: ;  // unknown opcode: no-op, MAR <- PC
        endcase
      end
      S_EXEC: begin
        ctrl.mar_ld = 1'b1;
        case (opcode)
          OP_ADD:  begin ctrl.ac_ld = 1'b1; ctrl.alu_op = ALU_ADD;   end
          OP_ADDS: begin ctrl.ac_ld = 1'b1; ctrl.alu_op = ALU_ADDS;  end
          OP_SUB:  begin ctrl.ac_ld = 1'b1; ctrl.alu_op = ALU_SUB;   end
          OP_SUBS: begin ctrl.ac_ld = 1'b1; ctrl.alu_op = ALU_SUBS;  end
          OP_AND:  begin ctrl.ac_ld = 1'b1; ctrl.alu_op = ALU_AND;   end
          OP_COM:  begin ctrl.ac_ld = 1'b1; ctrl.alu_op = ALU_COM;   end
          OP_LW, OP_LDI: begin ctrl.ac_ld = 1'b1; ctrl.alu_op = ALU_PASSB; end
          OP_SW:   ctrl.mem_we = 1'b1;
          default: ;
        endcase
      end
      default: next = S_FETCH;
    endcase
  end

  // Rules of the control word: a register never gets two sources at once.
  a_pc_one_source: assert property (@(posedge clk) disable iff (rst)
                                    !(ctrl.pc_ld && ctrl.pc_inc));
  a_no_write_and_load: assert property (@(posedge clk) disable iff (rst)
                                        !(ctrl.mem_we && ctrl.ac_ld));

endmodule
