// tb_scat_decoder: self-checking test of the SCAT instruction decoder.
//
// Decodes the instruction words of the worked examples (0x10538123,
// 0x11261000, 0x20120004, ...), sign-extension cases of the immediate
// (4, 2020, 32767, -32768, -7, -1), every opcode byte 0x00-0xFF for the
// legal/illegal flag and random words for the field positions.
module tb_scat_decoder;
  import scat_pkg::*;

  word_t instr;
  decoded_t dec;
  int checks = 0, failures = 0;

  scat_decoder dut (.instr, .dec);

  task automatic expect_fields(logic [31:0] w, logic ill, logic imm_sel, int op,
                               int rd, int rs1, int rs2, logic [31:0] imm);
    instr = w;
    #1;
    checks++;
    if (dec.illegal !== ill || dec.use_imm !== imm_sel || int'(dec.op) != op ||
        int'(dec.rd) != rd || int'(dec.rs1) != rs1 || int'(dec.rs2) != rs2 || dec.imm !== imm) begin
      failures++;
      $display("FAIL %h: ill=%b imm_sel=%b op=%0d rd=%0d rs1=%0d rs2=%0d imm=%h", w,
               dec.illegal, dec.use_imm, dec.op, dec.rd, dec.rs1, dec.rs2, dec.imm);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // add r5, r3, r8
    expect_fields(32'h10538123, 0, 0, 0, 5, 3, 8, 32'hFFFF_8123);
    // add r3, r4, r0
    expect_fields(32'h10340000, 0, 0, 0, 3, 4, 0, 32'h0);
    // sub r2, r6, r1
    expect_fields(32'h11261000, 0, 0, 1, 2, 6, 1, 32'h0000_1000);
    // xor r3, r8, r1
    expect_fields(32'h17381000, 0, 0, 7, 3, 8, 1, 32'h0000_1000);
    // addi r1, r2, 4
    expect_fields(32'h20120004, 0, 1, 0, 1, 2, 0, 32'h4);
    // mul r3, r1, r2
    expect_fields(32'h12312000, 0, 0, 2, 3, 1, 2, 32'h0000_2000);
    // Sign extension of the immediate.
    expect_fields(32'h201007E4, 0, 1, 0, 1, 0, 0, 32'd2020);
    expect_fields(32'h20107FFF, 0, 1, 0, 1, 0, 7, 32'd32767);
    expect_fields(32'h20108000, 0, 1, 0, 1, 0, 8, 32'hFFFF_8000);
    expect_fields(32'h2090FFF9, 0, 1, 0, 9, 0, 15, 32'hFFFF_FFF9);
    expect_fields(32'h2090FFFF, 0, 1, 0, 9, 0, 15, 32'hFFFF_FFFF);
    // Legal opcodes are exactly 0x10-0x17 and 0x20-0x27.
    for (int ob = 0; ob < 256; ob++) begin
      logic legal;
      instr = {8'(ob), 24'h123456};
      #1;
      legal = (ob >= 8'h10 && ob <= 8'h17) || (ob >= 8'h20 && ob <= 8'h27);
      checks++;
      if (dec.illegal !== !legal) begin
        failures++;
        $display("FAIL opcode %h illegal=%b", ob, dec.illegal);
      end
    end
    // Random words: field positions.
    for (int n = 0; n < 1000; n++) begin
      logic [31:0] w;
      w = $urandom;
      instr = w;
      #1;
      checks++;
      if (dec.rd !== w[23:20] || dec.rs1 !== w[19:16] || dec.rs2 !== w[15:12] ||
          dec.imm !== {{16{w[15]}}, w[15:0]} || dec.op !== alu_op_e'(w[27:24]) ||
          dec.use_imm !== (w[31:28] == 4'h2)) begin
        failures++;
        $display("FAIL random %h", w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
