// scat_memory_unit: the processor's interface to memory.
//
// During the Fetch step (fetch = 1) it puts the program counter on the
// address bus with a read strobe. Memory answers one cycle later; when the
// sequencer raises ir_load in that cycle the word is stored in the
// instruction register (ir), where it stays for the rest of the instruction.
// The unit never writes, because the instruction set defines no load or
// store. That the processor has a memory unit facing the address and data
// buses follows the SCAT machine; its contents (an address driver and an
// instruction register) are this design's own, the simplest that performs
// the fetch.
module scat_memory_unit
  import scat_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     fetch,
  input  word_t    pc,
  input  logic     ir_load,
  input  word_t    mem_rdata,
  output mem_req_t mem_req,
  output word_t    ir
);

  always_comb begin
    mem_req       = '0;
    mem_req.re    = fetch;
    mem_req.addr  = pc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       ir <= '0;
    else if (ir_load) ir <= mem_rdata;
  end

endmodule
