// scat_pkg: types and constants shared by the SCAT processor and its memory.
//
// SCAT is a small teaching machine: 16 registers of 32 bits (R0 reads zero,
// R15 is the program counter) and 32-bit instructions whose top nibble gives
// the instruction type and whose second nibble selects one of eight ALU
// operations. Type 1 (register-register) and type 2 (register-immediate) are
// the two types defined. The field positions, the opcode values and the
// register conventions follow the SCAT instruction set; the memory request
// struct and the state encoding are this design's own.
package scat_pkg;

  localparam int XLEN   = 32;
  localparam int NREGS  = 16;
  localparam int RIDX_W = 4;

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [RIDX_W-1:0] ridx_t;

  // R0 is hardwired to zero, R15 is the program counter.
  localparam ridx_t ZERO_REG = 4'd0;
  localparam ridx_t PC_REG   = 4'd15;

  // Each instruction is one word; the PC advances by this many bytes.
  localparam word_t INSTR_BYTES = 32'd4;

  // Instruction type, bits 31-28.
  typedef enum logic [3:0] {
    TYPE_RR = 4'h1,   // rd = rs1 op rs2
    TYPE_RI = 4'h2    // rd = rs1 op sxt(imm16)
  } itype_e;

  // ALU operation, bits 27-24 (the same for both types).
  typedef enum logic [3:0] {
    ALU_ADD = 4'h0,
    ALU_SUB = 4'h1,
    ALU_MUL = 4'h2,
    ALU_DIV = 4'h3,
    ALU_MOD = 4'h4,
    ALU_OR  = 4'h5,
    ALU_AND = 4'h6,
    ALU_XOR = 4'h7
  } alu_op_e;

  // Fields of a decoded instruction.
  typedef struct packed {
    logic    illegal;   // opcode is not one of 0x10-0x17, 0x20-0x27
    logic    use_imm;   // type 2: second operand is the immediate
    alu_op_e op;
    ridx_t   rd;        // bits 23-20
    ridx_t   rs1;       // bits 19-16
    ridx_t   rs2;       // bits 15-12 (type 1 only)
    word_t   imm;       // bits 15-0, sign-extended (type 2 only)
  } decoded_t;

  // One memory access: a word at a byte address.
  typedef struct packed {
    logic  re;
    logic  we;
    word_t addr;
    word_t wdata;
  } mem_req_t;

  // Steps of the von Neumann cycle.
  typedef enum logic [1:0] {
    S_FETCH   = 2'd0,
    S_DECODE  = 2'd1,
    S_EXECUTE = 2'd2,
    S_HALT    = 2'd3
  } cpu_state_e;

endpackage
