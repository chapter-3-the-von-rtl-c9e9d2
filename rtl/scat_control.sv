// scat_control: sequencer of the von Neumann cycle.
//
// Every instruction passes through three steps of one clock cycle each:
//   FETCH   - fetch = 1: the memory unit reads the word at the PC.
//   DECODE  - the word arrives from memory; ir_load = 1 stores it in the
//             instruction register and dec (the decoder's view of the same
//             word) is registered into dec_q. An illegal opcode leads to HALT.
//   EXECUTE - execute = 1: the operands named by dec_q are read, the ALU
//             result is written back to rd and the PC advances by 4.
// HALT is left only by reset. instr_count counts completed instructions.
// An instruction therefore takes exactly 3 cycles. The three steps and their
// order follow the von Neumann cycle; one cycle per step and stopping on an
// unknown opcode are this design's own choices.
module scat_control
  import scat_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  decoded_t   dec,
  output logic       fetch,
  output logic       ir_load,
  output logic       execute,
  output decoded_t   dec_q,
  output cpu_state_e state,
  output logic       halted,
  output word_t      instr_count
);

  cpu_state_e state_d;

  always_comb begin
    state_d = state;
    unique case (state)
      S_FETCH:   state_d = S_DECODE;
      S_DECODE:  state_d = dec.illegal ? S_HALT : S_EXECUTE;
      S_EXECUTE: state_d = S_FETCH;
      S_HALT:    state_d = S_HALT;
      default:   state_d = S_HALT;
    endcase
  end

  assign fetch   = (state == S_FETCH);
  assign ir_load = (state == S_DECODE);
  assign execute = (state == S_EXECUTE);
  assign halted  = (state == S_HALT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_FETCH;
      dec_q       <= '0;
      instr_count <= '0;
    end else begin
      state <= state_d;
      if (ir_load) dec_q <= dec;
      if (execute) instr_count <= instr_count + 32'd1;
    end
  end

  // Only a legal instruction may reach the execute step.
  always_ff @(posedge clk) begin
    if (rst_n && execute)
      assert (!dec_q.illegal) else $error("scat_control: illegal instruction executed");
  end

endmodule
