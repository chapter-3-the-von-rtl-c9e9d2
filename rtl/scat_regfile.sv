// scat_regfile: the sixteen 32-bit registers of the SCAT processor.
//
// R0 always reads zero and ignores writes. R15 is the program counter: it
// holds the address of the instruction being executed and can be read like
// any other register. R1-R14 are general purpose. There are two
// combinational read ports (the two ALU operands), one write port (the ALU
// result) and a debug read port, all written on the rising clock edge.
//
// pc_inc marks the end of an instruction: R15 then advances by 4, the size
// of one instruction. A write to R15 in the same cycle is taken first and
// the increment is applied to the written value, so the next instruction is
// fetched from (result + 4). The register conventions follow the SCAT
// instruction set; the treatment of a write to R15 and the reset values
// (R1-R14 = 0, R15 = RESET_PC) are this design's own choices.
module scat_regfile
  import scat_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  ridx_t rs1_addr,
  output word_t rs1_data,
  input  ridx_t rs2_addr,
  output word_t rs2_data,
  input  logic  we,
  input  ridx_t waddr,
  input  word_t wdata,
  input  logic  pc_inc,
  output word_t pc,
  input  ridx_t dbg_sel,
  output word_t dbg_data
);

  word_t gpr [1:NREGS-2];   // R1 .. R14
  word_t pc_q;
  word_t pc_base;

  function automatic word_t read_reg(ridx_t idx);
    if (idx == ZERO_REG)    return '0;
    else if (idx == PC_REG) return pc_q;
    else                    return gpr[idx];
  endfunction

  assign rs1_data = read_reg(rs1_addr);
  assign rs2_data = read_reg(rs2_addr);
  assign dbg_data = read_reg(dbg_sel);
  assign pc       = pc_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 1; i <= NREGS-2; i++) gpr[i] <= '0;
    end else if (we && waddr != ZERO_REG && waddr != PC_REG) begin
      gpr[waddr] <= wdata;
    end
  end

  assign pc_base = (we && waddr == PC_REG) ? wdata : pc_q;

  always_ff @(posedge clk) begin
    if (!rst_n)                          pc_q <= RESET_PC;
    else if (pc_inc)                     pc_q <= pc_base + INSTR_BYTES;
    else if (we && waddr == PC_REG)      pc_q <= wdata;
  end

endmodule
