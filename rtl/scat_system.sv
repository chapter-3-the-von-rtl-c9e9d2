// scat_system: a SCAT processor and its memory.
//
// The stored-program machine in its simplest form: the processor sends an
// address to the memory and exchanges data with it; program and data share
// the one memory. The processor starts fetching at address RESET_PC when
// rst_n goes high.
//
// The host port (host_we, host_addr, host_wdata) writes one word per cycle
// into memory, big-endian, and is meant to place a program there while
// rst_n holds the processor in reset; it takes priority over the processor.
// dbg_reg_sel/dbg_reg_data read any register, pc is R15, state is the
// current step of the cycle (0 fetch, 1 decode, 2 execute, 3 halted),
// halted is raised when an unrecognised opcode is met and instr_count
// counts the instructions executed since reset. The processor/memory split
// follows the von Neumann machine; the host port, debug outputs and memory
// size are this design's own.
module scat_system
  import scat_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 4096,
  parameter word_t       RESET_PC  = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        host_we,
  input  logic [31:0] host_addr,
  input  logic [31:0] host_wdata,
  input  logic [3:0]  dbg_reg_sel,
  output logic [31:0] dbg_reg_data,
  output logic [31:0] pc,
  output logic        halted,
  output logic [1:0]  state,
  output logic [31:0] instr_count
);

  mem_req_t   cpu_req, mem_req;
  word_t      mem_rdata;
  cpu_state_e cpu_state;

  scat_cpu #(.RESET_PC(RESET_PC)) u_cpu (
    .clk, .rst_n,
    .mem_req   (cpu_req),
    .mem_rdata,
    .dbg_reg_sel,
    .dbg_reg_data,
    .pc,
    .halted,
    .state     (cpu_state),
    .instr_count
  );

  assign state = cpu_state;

  always_comb begin
    if (host_we) begin
      mem_req       = '0;
      mem_req.we    = 1'b1;
      mem_req.addr  = host_addr;
      mem_req.wdata = host_wdata;
    end else begin
      mem_req = cpu_req;
    end
  end

  scat_memory #(.MEM_BYTES(MEM_BYTES)) u_memory (
    .clk,
    .req   (mem_req),
    .rdata (mem_rdata)
  );

endmodule
