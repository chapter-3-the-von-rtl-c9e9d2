// tb_scat_alu: self-checking test of the SCAT ALU.
//
// Applies corner cases (zero, -1, most negative number, division by zero,
// the overflowing -2^31 / -1) and random operands to every operation and
// compares y with the 64-bit reference model of scat_asm_pkg.
module tb_scat_alu;
  import scat_pkg::*;
  import scat_asm_pkg::*;

  alu_op_e op;
  word_t a, b, y;
  int checks = 0, failures = 0;

  scat_alu dut (.op, .a, .b, .y);

  task automatic check(int o, logic [31:0] ta, logic [31:0] tb_);
    logic [31:0] exp;
    op = alu_op_e'(o); a = ta; b = tb_;
    #1;
    exp = ref_alu(o, ta, tb_);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h expected %h", o, ta, tb_, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] corner [8] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000,
                              32'h7FFF_FFFF, 32'd7, 32'hFFFF_FFFB, 32'h0000_00FF};

  initial begin
    // Values from the register example: R8 = 0xFF, R9 = -5.
    check(ADD, 32'h2A, 32'hFF);                 // 0x129
    check(SUB, 32'hFF, 32'hFFFF_FFFB);          // 0x104
    check(SUB, 32'hF, 32'h7);                   // 8
    if (y !== 32'h8) begin failures++; $display("FAIL 0xF-7"); end
    checks++;
    check(MUL, 32'd6, 32'd7);
    if (y !== 32'd42) begin failures++; $display("FAIL 6*7"); end
    checks++;
    check(DIV, 32'hFFFF_FFF9, 32'd2);           // -7/2 = -3
    if (y !== 32'hFFFF_FFFD) begin failures++; $display("FAIL -7/2"); end
    checks++;
    check(MOD, 32'hFFFF_FFF9, 32'd2);           // -7%2 = -1
    if (y !== 32'hFFFF_FFFF) begin failures++; $display("FAIL -7%%2"); end
    checks++;
    for (int o = 0; o < 8; o++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          check(o, corner[i], corner[j]);
    for (int n = 0; n < 4000; n++) begin
      logic [31:0] ra, rb;
      ra = $urandom;
      rb = (n % 3 == 0) ? 32'($urandom_range(0, 20)) - 32'd10 : $urandom;
      check(n % 8, ra, rb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
