// scat_decoder: splits a SCAT instruction word into its fields.
//
// Purely combinational. The word is read as
//   31-28 type (1 = register-register, 2 = register-immediate)
//   27-24 ALU operation, 23-20 rd, 19-16 rs1,
//   15-12 rs2 (type 1) or 15-0 immediate (type 2).
// The 16-bit immediate is sign-extended to 32 bits by copying bit 15 into
// bits 31-16. These positions and the sign extension follow the SCAT
// instruction formats. Flagging every opcode other than 0x10-0x17 and
// 0x20-0x27 as illegal is this design's own choice: the instruction set only
// defines those sixteen.
module scat_decoder
  import scat_pkg::*;
(
  input  word_t    instr,
  output decoded_t dec
);

  logic [3:0] itype;
  logic [3:0] opnib;

  assign itype = instr[31:28];
  assign opnib = instr[27:24];

  always_comb begin
    dec.op      = alu_op_e'(opnib);
    dec.rd      = instr[23:20];
    dec.rs1     = instr[19:16];
    dec.rs2     = instr[15:12];
    dec.imm     = {{16{instr[15]}}, instr[15:0]};
    dec.use_imm = (itype == TYPE_RI);
    dec.illegal = !((itype == TYPE_RR || itype == TYPE_RI) && opnib <= 4'h7);
  end

endmodule
