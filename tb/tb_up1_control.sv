// tb_up1_control: walks the control unit through every opcode value with
// Z = 0 and Z = 1 and checks, cycle by cycle, the control word and the
// instruction length: 3 cycles (fetch, decode, execute) for Add, Adds, Sub,
// Subs, And, Com, Lw, Ldi and Sw; 2 cycles for Jmp, Jmpz and unknown
// opcodes.  Cycles with `ce` low are inserted and must change nothing.
module tb_up1_control;
  import up1_pkg::*;

  logic       clk = 0, rst, ce, flag_z;
  logic [7:0] opcode;
  ctrl_t      ctrl;
  state_e     state;
  int         checks = 0, failures = 0;
  int         n_len2 = 0, n_len3 = 0, n_hold = 0;

  up1_control dut (.clk(clk), .rst(rst), .ce(ce), .opcode(opcode), .flag_z(flag_z),
                   .ctrl(ctrl), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected control word: {ir_ld, pc_inc, pc_ld, mar_ld, mar_sel, ac_ld, alu_op, mem_we}
  function automatic ctrl_t expect_ctrl(int cyc, logic [7:0] op, logic z);
    ctrl_t c = '0;
    c.alu_op = ALU_PASSB;
    if (cyc == 0) begin c.ir_ld = 1; c.pc_inc = 1; return c; end
    c.mar_ld = 1;
    if (cyc == 1) begin
      if (op inside {8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h07, 8'h09}) c.mar_sel = 1;
      if (op == 8'h08) c.pc_inc = 1;
      if (op == 8'h0A || (op == 8'h0B && z)) begin c.mar_sel = 1; c.pc_ld = 1; end
      return c;
    end
    case (op)
      8'h01: begin c.ac_ld = 1; c.alu_op = ALU_ADD;  end
      8'h02: begin c.ac_ld = 1; c.alu_op = ALU_ADDS; end
      8'h03: begin c.ac_ld = 1; c.alu_op = ALU_SUB;  end
      8'h04: begin c.ac_ld = 1; c.alu_op = ALU_SUBS; end
      8'h05: begin c.ac_ld = 1; c.alu_op = ALU_AND;  end
      8'h06: begin c.ac_ld = 1; c.alu_op = ALU_COM;  end
      8'h07, 8'h08: c.ac_ld = 1;
      8'h09: c.mem_we = 1;
      default: ;
    endcase
    return c;
  endfunction

  function automatic int expect_len(logic [7:0] op);
    return (op >= 8'h01 && op <= 8'h09) ? 3 : 2;
  endfunction

  initial begin
    rst = 1; ce = 1; opcode = 0; flag_z = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int op = 0; op < 256; op++) begin
      for (int z = 0; z < 2; z++) begin
        int len;
        len = 0;
        opcode = 8'(op); flag_z = z[0];
        checks++;
        if (state !== S_FETCH) begin failures++; $display("FAIL op %h: not at fetch", op); end
        do begin
          ctrl_t e;
          e = expect_ctrl(len, 8'(op), z[0]);
          #1;
          checks++;
          if (ctrl !== e) begin
            failures++;
            $display("FAIL op %h z %0d cycle %0d: ctrl %b expected %b", op, z, len, ctrl, e);
          end
          // Sometimes hold the enable low for a cycle: nothing may move.
          if ($urandom_range(3) == 0) begin
            state_e s0;
            s0 = state;
            ce = 0; @(posedge clk); #1; ce = 1; n_hold++;
            checks++;
            if (state !== s0) begin failures++; $display("FAIL state moved with ce low"); end
          end
          @(posedge clk);
          len++;
          @(negedge clk);
        end while (state != S_FETCH && len < 6);
        checks++;
        if (len != expect_len(8'(op))) begin
          failures++;
          $display("FAIL op %h: took %0d cycles, expected %0d", op, len, expect_len(8'(op)));
        end
        if (len == 2) n_len2++; else n_len3++;
      end
    end
    checks++;
    if (n_len2 == 0 || n_len3 == 0 || n_hold < 50) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
