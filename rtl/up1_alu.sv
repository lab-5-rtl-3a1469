// up1_alu: the 16-bit arithmetic/logic unit of the uP1.
//
// Input A is the accumulator, input B is the word read from memory.  The
// operations are those the uP1 instruction set needs: add and subtract, both
// plain (wrap-around) and with signed saturation, bitwise AND, one's
// complement of A, and pass-B for the load instructions.  Saturation treats
// the operands as two's-complement numbers and clamps a result that
// overflows to 0x7FFF (positive) or 0x8000 (negative); the saturation rule
// is this design's reading of "(sat)" in the instruction table.
//
// N is bit 15 of Y and Z is set when Y is zero.  The unit is purely
// combinational; the flags are registered outside it, in the datapath.
module up1_alu
  import up1_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y,
  output logic    n,
  output logic    z
);

  word_t sum, diff;
  logic  add_ovf, sub_ovf;

  always_comb begin
    sum     = a + b;
    diff    = a - b;
    // Signed overflow: operands of equal sign give a sum of the other sign;
    // operands of different sign give a difference with the sign of B.
    add_ovf = (a[15] == b[15]) && (sum[15] != a[15]);
    sub_ovf = (a[15] != b[15]) && (diff[15] != a[15]);

    unique case (op)
      ALU_PASSB: y = b;
      ALU_ADD:   y = sum;
      ALU_ADDS:  y = add_ovf ? (a[15] ? 16'h8000 : 16'h7FFF) : sum;
      ALU_SUB:   y = diff;
      ALU_SUBS:  y = sub_ovf ? (a[15] ? 16'h8000 : 16'h7FFF) : diff;
      ALU_AND:   y = a & b;
      ALU_COM:   y = ~a;
      default:   y = b;
    endcase

    n = y[15];
    z = (y == '0);
  end

endmodule
