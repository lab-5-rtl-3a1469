// tb_up1_alu: self-checking test of the uP1 ALU.
//
// Drives every operation with corner operands (0, 1, 0x7FFF, 0x8000,
// 0xFFFF) and random ones, and compares Y, N and Z with results worked out
// here in 32-bit signed arithmetic: saturation clamps to [-32768, 32767].
module tb_up1_alu;
  import up1_pkg::*;

  alu_op_e op;
  word_t   a, b, y;
  logic    n, z;
  int      checks = 0, failures = 0;
  int      n_sat = 0;

  up1_alu dut (.op(op), .a(a), .b(b), .y(y), .n(n), .z(z));

  function automatic word_t model(alu_op_e o, word_t av, word_t bv);
    int sa, sb, r;
    sa = int'($signed(av));
    sb = int'($signed(bv));
    case (o)
      ALU_PASSB: return bv;
      ALU_ADD:   return word_t'(av + bv);
      ALU_SUB:   return word_t'(av - bv);
      ALU_ADDS: begin
        r = sa + sb;
        if (r > 32767) r = 32767;
        if (r < -32768) r = -32768;
        return word_t'(r);
      end
      ALU_SUBS: begin
        r = sa - sb;
        if (r > 32767) r = 32767;
        if (r < -32768) r = -32768;
        return word_t'(r);
      end
      ALU_AND:   return av & bv;
      ALU_COM:   return ~av;
      default:   return 'x;
    endcase
  endfunction

  task automatic check(alu_op_e o, word_t av, word_t bv);
    word_t e;
    op = o; a = av; b = bv;
    #1;
    e = model(o, av, bv);
    checks++;
    if (y !== e || n !== e[15] || z !== (e == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h n=%b z=%b expected %h", o.name(), av, bv, y, n, z, e);
    end
    if ((o == ALU_ADDS && e != word_t'(av + bv)) || (o == ALU_SUBS && e != word_t'(av - bv)))
      n_sat++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t corners [5] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF};
    alu_op_e ops [7] = '{ALU_PASSB, ALU_ADD, ALU_ADDS, ALU_SUB, ALU_SUBS, ALU_AND, ALU_COM};
    foreach (ops[i]) foreach (corners[j]) foreach (corners[k])
      check(ops[i], corners[j], corners[k]);
    repeat (2000) check(ops[$urandom_range(6)], word_t'($urandom), word_t'($urandom));
    // Known values: the Fibonacci overflow step and a negative clamp.
    check(ALU_ADDS, 16'd17711, 16'd28657);
    checks++; if (y !== 16'h7FFF) failures++;
    check(ALU_SUBS, 16'h8000, 16'h0001);
    checks++; if (y !== 16'h8000) failures++;
    checks++; if (n_sat < 10) begin failures++; $display("saturation rarely exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
