// scat_cpu: the SCAT processor.
//
// A multi-cycle implementation of the von Neumann cycle. The sequencer
// (scat_control) steps through Fetch, Decode and Execute, one clock cycle
// each. In Fetch the memory unit reads the word at the PC (R15). In Decode
// the word is stored in the instruction register and split into fields by the
// decoder. In Execute the register file supplies rs1 and either rs2 (type 1)
// or the sign-extended immediate (type 2) to the ALU, the result is written
// to rd (ignored for R0) and R15 advances by 4. An unrecognised opcode stops
// the processor (halted = 1) until reset.
//
// Memory interface: mem_req carries a read strobe, a write strobe (never
// used here), the byte address and write data; mem_rdata must return the
// word one cycle after the read strobe. Throughput: one instruction every
// 3 cycles. The block structure (registers, ALU, memory unit) and the cycle
// follow the SCAT machine; the cycle timing and the halt are this design's.
module scat_cpu
  import scat_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic       clk,
  input  logic       rst_n,
  output mem_req_t   mem_req,
  input  word_t      mem_rdata,
  input  ridx_t      dbg_reg_sel,
  output word_t      dbg_reg_data,
  output word_t      pc,
  output logic       halted,
  output cpu_state_e state,
  output word_t      instr_count
);

  logic     fetch, ir_load, execute;
  decoded_t dec, dec_q;
  word_t    ir;
  word_t    rs1_data, rs2_data, alu_b, alu_y;

  scat_control u_control (
    .clk, .rst_n, .dec,
    .fetch, .ir_load, .execute, .dec_q,
    .state, .halted, .instr_count
  );

  scat_memory_unit u_mem_unit (
    .clk, .rst_n, .fetch, .pc, .ir_load, .mem_rdata,
    .mem_req, .ir
  );

  // The decoder looks at the word as it arrives, so its fields are ready to
  // be registered at the end of the Decode step.
  scat_decoder u_decoder (
    .instr (ir_load ? mem_rdata : ir),
    .dec
  );

  scat_regfile #(.RESET_PC(RESET_PC)) u_regfile (
    .clk, .rst_n,
    .rs1_addr (dec_q.rs1), .rs1_data,
    .rs2_addr (dec_q.rs2), .rs2_data,
    .we       (execute),
    .waddr    (dec_q.rd),
    .wdata    (alu_y),
    .pc_inc   (execute),
    .pc,
    .dbg_sel  (dbg_reg_sel),
    .dbg_data (dbg_reg_data)
  );

  assign alu_b = dec_q.use_imm ? dec_q.imm : rs2_data;

  scat_alu u_alu (
    .op (dec_q.op),
    .a  (rs1_data),
    .b  (alu_b),
    .y  (alu_y)
  );

endmodule
