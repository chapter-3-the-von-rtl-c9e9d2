// scat_alu: the arithmetic and logic unit of the SCAT processor.
//
// Purely combinational. It computes y = a op b for the eight operations of
// the instruction set (add, sub, mul, div, mod, or, and, xor), selected by the
// low nibble of the opcode. Operands are 32-bit two's complement numbers.
// The operation list comes from the instruction set; the following are this
// design's own choices where the instruction set is silent: mul keeps the low
// 32 bits of the product; div and mod are signed, the quotient truncates
// toward zero and the remainder takes the sign of the dividend; division by
// zero gives a quotient of all ones and a remainder equal to the dividend;
// the overflowing -2^31 / -1 gives -2^31 with remainder 0.
module scat_alu
  import scat_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);

  logic signed [XLEN-1:0] sa, sb;
  logic div_zero, div_ovf;

  assign sa = signed'(a);
  assign sb = signed'(b);
  assign div_zero = (b == '0);
  assign div_ovf  = (a == {1'b1, {(XLEN-1){1'b0}}}) && (b == '1);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_MUL: y = a * b;
      ALU_DIV: begin
        if (div_zero)     y = '1;
        else if (div_ovf) y = a;
        else              y = word_t'(sa / sb);
      end
      ALU_MOD: begin
        if (div_zero)     y = a;
        else if (div_ovf) y = '0;
        else              y = word_t'(sa % sb);
      end
      ALU_OR:  y = a | b;
      ALU_AND: y = a & b;
      ALU_XOR: y = a ^ b;
      default: y = '0;
    endcase
  end

endmodule
