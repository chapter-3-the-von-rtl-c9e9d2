// tb_scat_system: end-to-end test of the SCAT processor with its memory.
//
// Programs are written into memory through the host port while the
// processor is held in reset, then run until the processor halts on the
// word 0x00000000 (an unrecognised opcode). The testbench follows every
// instruction in lockstep with an instruction-set model: at each Execute
// step it checks the PC and, one cycle later, the register written. At the
// end all sixteen registers are compared and the cycle count must be
// 3 per instruction. Programs:
//   1. the three-instruction example addi r1,r0,6; addi r2,r0,7;
//      mul r3,r1,r2 (R3 = 42), with its machine code checked against
//      20100006, 20200007, 12312000;
//   2. the register-setting program of the worked example followed by the
//      worked instructions 0x10538123, 0x1066D000, 0x11261000, 0x11189000;
//   3. a directed program using all sixteen opcodes, writes to R0, R15 as
//      source and destination, negative immediates and division by zero;
//   4. a long random program.
// Each mechanism is counted and must occur at least once. All parameters
// stay at their defaults.
module tb_scat_system;
  import scat_asm_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        host_we;
  logic [31:0] host_addr, host_wdata;
  logic [3:0]  dbg_reg_sel;
  logic [31:0] dbg_reg_data, pc, instr_count;
  logic        halted;
  logic [1:0]  state;

  scat_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_fetch = 0, n_decode = 0, n_execute = 0, n_halt = 0;
  int n_op [16];
  int n_r0_write = 0, n_pc_read = 0, n_pc_write = 0, n_neg_imm = 0, n_div0 = 0;

  logic [31:0] prog [$];
  logic [31:0] image [int];      // word address -> word, the memory as loaded
  logic [31:0] regs [16];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    case (state)
      2'd0: n_fetch++;
      2'd1: n_decode++;
      2'd2: n_execute++;
      default: n_halt++;
    endcase
  end

  // Load prog at address 0 followed by the halting word, then run it in
  // lockstep with the model.
  task automatic run_prog(string name);
    int cycles, executed;
    rst_n = 0;
    @(negedge clk);
    for (int i = 0; i <= prog.size(); i++) begin
      host_we = 1;
      host_addr = 32'(4 * i);
      host_wdata = (i < prog.size()) ? prog[i] : 32'h0;
      image[4 * i] = host_wdata;
      @(negedge clk);
    end
    host_we = 0;
    for (int r = 0; r < 16; r++) regs[r] = 0;
    rst_n = 1;
    cycles = 0;
    executed = 0;
    while (!halted && cycles < 200000) begin
      if (state == 2'd2) begin
        logic [31:0] w;
        int rd;
        w = image[int'(pc)];
        rd = int'(w[23:20]);
        cmp($sformatf("%s: pc at instr %0d", name, executed), pc, regs[15]);
        n_op[{w[29], w[26:24]}]++;   // type 1 -> 0..7, type 2 -> 8..15
        if (rd == 0) n_r0_write++;
        if (rd == 15) n_pc_write++;
        if (w[19:16] == 15 || (w[31:28] == 1 && w[15:12] == 15)) n_pc_read++;
        if (w[31:28] == 2 && w[15]) n_neg_imm++;
        if ((w[27:24] == 3 || w[27:24] == 4) &&
            ((w[31:28] == 2 && w[15:0] == 0) ||
             (w[31:28] == 1 && (w[15:12] == 0 || regs[w[15:12]] == 0))))
          n_div0++;
        void'(iss_step(regs, w));
        dbg_reg_sel = 4'(rd);
        @(negedge clk);
        cycles++;
        executed++;
        cmp($sformatf("%s: R%0d after instr %0d", name, rd, executed - 1), dbg_reg_data, regs[rd]);
      end else begin
        @(negedge clk);
        cycles++;
      end
    end
    cmp({name, ": halted"}, 32'(halted), 32'd1);
    cmp({name, ": cycles"}, 32'(cycles), 32'(3 * prog.size() + 2));
    cmp({name, ": instr_count"}, instr_count, 32'(prog.size()));
    for (int r = 0; r < 16; r++) begin
      dbg_reg_sel = 4'(r);
      #1;
      cmp($sformatf("%s: final R%0d", name, r), dbg_reg_data, regs[r]);
    end
    // Stays halted.
    repeat (4) @(negedge clk);
    cmp({name, ": still halted"}, 32'(halted), 32'd1);
    cmp({name, ": count frozen"}, instr_count, 32'(prog.size()));
  endtask

  initial begin
    host_we = 0; host_addr = 0; host_wdata = 0; dbg_reg_sel = 0;
    for (int i = 0; i < 16; i++) n_op[i] = 0;
    repeat (2) @(negedge clk);

    // 1. The three-instruction example.
    prog = '{ri(ADD, 1, 0, 6), ri(ADD, 2, 0, 7), rr(MUL, 3, 1, 2)};
    cmp("encode addi r1,r0,6", prog[0], 32'h20100006);
    cmp("encode addi r2,r0,7", prog[1], 32'h20200007);
    cmp("encode mul r3,r1,r2", prog[2], 32'h12312000);
    cmp("encode addi r1,r2,4", ri(ADD, 1, 2, 4), 32'h20120004);
    cmp("encode xor r3,r8,r1", rr(XOR, 3, 8, 1), 32'h17381000);
    run_prog("first");
    dbg_reg_sel = 3; #1;
    cmp("first: R3 = 42", dbg_reg_data, 32'd42);

    // 2. Register-setting program plus the worked instructions.
    prog.delete();
    for (int i = 0; i < SETUP_LEN; i++) prog.push_back(setup_prog(i));
    run_prog("setup");
    for (int r = 1; r < 15; r++) begin
      dbg_reg_sel = 4'(r); #1;
      cmp($sformatf("setup: R%0d", r), dbg_reg_data, example_reg(r));
    end
    prog.push_back(32'h10538123);   // R5 = 0x2A + 0xFF = 0x129
    prog.push_back(32'h1066D000);   // R6 = 0xF + 1 = 0x10
    prog.push_back(32'h11261000);   // R2 = 0x10 - 7 = 9 (R6 changed above)
    prog.push_back(32'h11189000);   // R1 = 0xFF - (-5) = 0x104
    run_prog("worked");
    dbg_reg_sel = 5; #1; cmp("worked: R5", dbg_reg_data, 32'h129);
    dbg_reg_sel = 6; #1; cmp("worked: R6", dbg_reg_data, 32'h10);
    dbg_reg_sel = 2; #1; cmp("worked: R2", dbg_reg_data, 32'h9);
    dbg_reg_sel = 1; #1; cmp("worked: R1", dbg_reg_data, 32'h104);

    // 3. Directed program.
    prog = '{
      ri(ADD, 9, 0, -5),          // addi r9, r0, -5
      ri(SUB, 10, 0, 5),          // subi r10, r0, 5  (also -5)
      ri(ADD, 1, 0, 100),
      ri(ADD, 2, 0, -7),
      rr(ADD, 3, 1, 2), rr(SUB, 3, 1, 2), rr(MUL, 3, 1, 2), rr(DIV, 4, 1, 2),
      rr(MOD, 5, 1, 2), rr(OR, 6, 1, 2), rr(AND, 7, 1, 2), rr(XOR, 8, 1, 2),
      ri(SUB, 3, 1, -3), ri(MUL, 3, 2, -300), ri(DIV, 4, 2, 2), ri(MOD, 5, 2, 2),
      ri(OR, 6, 1, 'hF0F0), ri(AND, 7, 2, 'h00FF), ri(XOR, 8, 2, -1),
      rr(DIV, 11, 1, 0), rr(MOD, 12, 1, 0), ri(DIV, 13, 2, 0),
      rr(ADD, 0, 1, 2),           // write to R0 is ignored
      ri(ADD, 0, 0, 1234),
      rr(ADD, 14, 15, 0),         // R14 = address of this instruction
      ri(ADD, 15, 0, 'h80),       // jump: next instruction at 0x84
      ri(ADD, 3, 0, 1)            // skipped by the jump
    };
    // Fill up to the jump target with more skipped words, then continue.
    while (prog.size() < 'h84 / 4) prog.push_back(ri(ADD, 3, 0, 2));
    prog.push_back(rr(ADD, 13, 15, 0));  // R13 = 0x84
    prog.push_back(ri(ADD, 9, 9, 1));
    run_prog_directed();

    // 4. Long random program.
    prog.delete();
    for (int i = 0; i < 600; i++) begin
      int rd;
      rd = $urandom_range(0, 14);
      if ($urandom_range(0, 1) == 1)
        prog.push_back(rr($urandom_range(0, 7), rd, $urandom_range(0, 15), $urandom_range(0, 14)));
      else
        prog.push_back(ri($urandom_range(0, 7), rd, $urandom_range(0, 15),
                          ($urandom_range(0, 3) == 0) ? $urandom_range(0, 9) : $urandom));
    end
    run_prog("random");

    // Every mechanism must have happened.
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("FAIL opcode %0d never executed", i); end
    end
    begin
      int m [9];
      string nm [9];
      m = '{n_fetch, n_decode, n_execute, n_halt, n_r0_write, n_pc_read, n_pc_write, n_neg_imm, n_div0};
      nm = '{"fetch step", "decode step", "execute step", "halt", "write to R0",
             "R15 read", "R15 written", "negative immediate", "division by zero"};
      for (int i = 0; i < 9; i++) begin
        $display("mechanism %-20s occurred %0d times", nm[i], m[i]);
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL %s never happened", nm[i]); end
      end
      checks++;
      if (!(n_fetch == n_execute + 5 && n_decode == n_fetch)) begin
        failures++;
        $display("FAIL step counts fetch=%0d decode=%0d execute=%0d", n_fetch, n_decode, n_execute);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The directed program jumps, so its cycle count is that of the
  // instructions actually executed; it is run with its own expectations.
  task automatic run_prog_directed();
    int cycles, executed;
    rst_n = 0;
    @(negedge clk);
    for (int i = 0; i <= prog.size(); i++) begin
      host_we = 1;
      host_addr = 32'(4 * i);
      host_wdata = (i < prog.size()) ? prog[i] : 32'h0;
      image[4 * i] = host_wdata;
      @(negedge clk);
    end
    host_we = 0;
    for (int r = 0; r < 16; r++) regs[r] = 0;
    rst_n = 1;
    cycles = 0;
    executed = 0;
    while (!halted && cycles < 20000) begin
      if (state == 2'd2) begin
        logic [31:0] w;
        int rd;
        w = image[int'(pc)];
        rd = int'(w[23:20]);
        cmp($sformatf("directed: pc at instr %0d", executed), pc, regs[15]);
        n_op[{w[29], w[26:24]}]++;
        if (rd == 0) n_r0_write++;
        if (rd == 15) n_pc_write++;
        if (w[19:16] == 15 || (w[31:28] == 1 && w[15:12] == 15)) n_pc_read++;
        if (w[31:28] == 2 && w[15]) n_neg_imm++;
        if ((w[27:24] == 3 || w[27:24] == 4) &&
            ((w[31:28] == 2 && w[15:0] == 0) ||
             (w[31:28] == 1 && (w[15:12] == 0 || regs[w[15:12]] == 0))))
          n_div0++;
        void'(iss_step(regs, w));
        dbg_reg_sel = 4'(rd);
        @(negedge clk);
        cycles++;
        executed++;
        if (rd != 15)
          cmp($sformatf("directed: R%0d after instr %0d", rd, executed - 1), dbg_reg_data, regs[rd]);
      end else begin
        @(negedge clk);
        cycles++;
      end
    end
    // 25 instructions, the jump, then 2 after its target.
    cmp("directed: executed", 32'(executed), 32'd28);
    cmp("directed: cycles", 32'(cycles), 32'(3 * 28 + 2));
    for (int r = 0; r < 16; r++) begin
      dbg_reg_sel = 4'(r);
      #1;
      cmp($sformatf("directed: final R%0d", r), dbg_reg_data, regs[r]);
    end
    // Values worked out by hand.
    dbg_reg_sel = 10; #1; cmp("subi r10, r0, 5", dbg_reg_data, 32'hFFFF_FFFB);
    dbg_reg_sel = 9;  #1; cmp("addi r9, r0, -5; +1", dbg_reg_data, 32'hFFFF_FFFC);
    dbg_reg_sel = 4;  #1; cmp("divi -7 / 2", dbg_reg_data, 32'hFFFF_FFFD);
    dbg_reg_sel = 5;  #1; cmp("modi -7 % 2", dbg_reg_data, 32'hFFFF_FFFF);
    dbg_reg_sel = 6;  #1; cmp("ori 100 | sxt(F0F0)", dbg_reg_data, 32'hFFFF_F0F4);
    dbg_reg_sel = 11; #1; cmp("div by zero", dbg_reg_data, 32'hFFFF_FFFF);
    dbg_reg_sel = 12; #1; cmp("mod by zero", dbg_reg_data, 32'd100);
    dbg_reg_sel = 14; #1; cmp("R14 = pc", dbg_reg_data, 32'h60);
    dbg_reg_sel = 13; #1; cmp("R13 = pc after jump", dbg_reg_data, 32'h84);
    dbg_reg_sel = 3;  #1; cmp("skipped words not run", dbg_reg_data, 32'd2100);
  endtask
endmodule
