// scat_asm_pkg: testbench helpers for the SCAT machine.
//
// Encoding functions that assemble type 1 (register-register) and type 2
// (register-immediate) instructions by hand, and a reference model of the
// ALU computed in 64-bit arithmetic, independent of the RTL's formulation.
package scat_asm_pkg;

  // ALU operation numbers (opcode bits 27-24).
  localparam int ADD = 0, SUB = 1, MUL = 2, DIV = 3, MOD = 4, OR = 5, AND = 6, XOR = 7;

  // op rd, rs1, rs2   ->  0x1<op> <rd><rs1> <rs2>000
  function automatic logic [31:0] rr(int op, int rd, int rs1, int rs2);
    return {4'h1, 4'(op), 4'(rd), 4'(rs1), 4'(rs2), 12'h000};
  endfunction

  // opi rd, rs1, imm  ->  0x2<op> <rd><rs1> <imm16>
  function automatic logic [31:0] ri(int op, int rd, int rs1, int imm);
    return {4'h2, 4'(op), 4'(rd), 4'(rs1), 16'(imm)};
  endfunction

  // Reference ALU. Signed division truncating toward zero; by zero the
  // quotient is -1 and the remainder the dividend.
  function automatic logic [31:0] ref_alu(int op, logic [31:0] a, logic [31:0] b);
    longint sa, sb, q, r;
    sa = longint'(signed'(a));
    sb = longint'(signed'(b));
    case (op)
      ADD: return 32'(sa + sb);
      SUB: return 32'(sa - sb);
      MUL: return 32'(sa * sb);
      DIV: begin
        if (sb == 0) return 32'hFFFF_FFFF;
        q = sa / sb;            // 64-bit: -2^31 / -1 = 2^31, truncated back
        return 32'(q);
      end
      MOD: begin
        if (sb == 0) return a;
        r = sa - (sa / sb) * sb;
        return 32'(r);
      end
      OR:  return a | b;
      AND: return a & b;
      XOR: return a ^ b;
      default: return 32'h0;
    endcase
  endfunction

  // Instruction-set reference: executes one instruction word on a register
  // array (index 15 is the PC). Returns 0 for an illegal opcode, leaving the
  // state unchanged.
  function automatic bit iss_step(ref logic [31:0] regs [16], input logic [31:0] w);
    logic [31:0] a, b, y;
    int t, op, rd;
    t  = int'(w[31:28]);
    op = int'(w[27:24]);
    rd = int'(w[23:20]);
    if (!((t == 1 || t == 2) && op <= 7)) return 0;
    a = regs[w[19:16]];
    if (t == 1) b = regs[w[15:12]];
    else        b = {{16{w[15]}}, w[15:0]};
    if (w[19:16] == 0) a = 0;
    if (t == 1 && w[15:12] == 0) b = 0;
    y = ref_alu(op, a, b);
    if (rd != 0) regs[rd] = y;
    regs[15] = regs[15] + 4;
    regs[0] = 0;
    return 1;
  endfunction

  // Program that loads the register values of the worked example
  // (R1 = 7, R2 = 0x1234, ..., R14 = 0x100) using only addi, muli and ori.
  localparam int SETUP_LEN = 18;
  function automatic logic [31:0] setup_prog(int i);
    case (i)
      0:  return ri(ADD, 1, 0, 7);
      1:  return ri(ADD, 2, 0, 'h1234);
      2:  return ri(ADD, 3, 0, 'h2A);
      3:  return ri(ADD, 4, 0, 'h10);
      4:  return ri(ADD, 5, 0, 'h24);
      5:  return ri(ADD, 6, 0, 'hF);
      6:  return ri(ADD, 7, 0, 'h4321);
      7:  return ri(MUL, 7, 7, 'h100);
      8:  return ri(MUL, 7, 7, 'h100);
      9:  return ri(OR,  7, 7, 'h5678);
      10: return ri(ADD, 8, 0, 'hFF);
      11: return ri(ADD, 9, 0, -5);
      12: return ri(ADD, 10, 0, 'h42);
      13: return ri(ADD, 11, 0, 'h10);
      14: return ri(ADD, 12, 0, 'h657F);
      15: return ri(MUL, 12, 12, 2);
      16: return ri(ADD, 13, 0, 1);
      default: return ri(ADD, 14, 0, 'h100);
    endcase
  endfunction

  // Register values of the worked example, R0..R14 (R15 is the PC).
  function automatic logic [31:0] example_reg(int r);
    case (r)
      1: return 32'd7;        2: return 32'h1234;     3: return 32'h2A;
      4: return 32'h10;       5: return 32'h24;       6: return 32'hF;
      7: return 32'h43215678; 8: return 32'hFF;       9: return -32'sd5;
      10: return 32'h42;      11: return 32'h10;      12: return 32'hCAFE;
      13: return 32'd1;       14: return 32'h100;
      default: return 32'h0;
    endcase
  endfunction

endpackage
