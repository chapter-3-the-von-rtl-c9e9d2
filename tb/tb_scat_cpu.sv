// tb_scat_cpu: self-checking test of the SCAT processor.
//
// The processor runs against a byte-array memory model in the testbench
// (big-endian, one cycle read latency). Each program ends with the word
// 0x00000000, an unrecognised opcode, which halts the processor. The tests:
//  - the register-setting program of the worked example followed by each
//    worked single instruction (0x10538123, 0x10340000, 0x1066D000,
//    0x11261000, 0x11189000, and xor r3, r8, r1); results are compared
//    with values worked out by hand;
//  - R15 as a source (reads the address of the current instruction) and as
//    a destination (next instruction at result + 4), writes to R0 ignored;
//  - random programs of type 1 and type 2 instructions compared register by
//    register with an instruction-set model.
// Every instruction must take exactly 3 cycles.
module tb_scat_cpu;
  import scat_pkg::*;
  import scat_asm_pkg::*;

  localparam int MEMB = 1024;

  logic clk = 0, rst_n = 0;
  mem_req_t mem_req;
  word_t mem_rdata, dbg_reg_data, pc, instr_count;
  ridx_t dbg_reg_sel;
  logic halted;
  cpu_state_e state;
  int checks = 0, failures = 0;
  logic [7:0] mem [MEMB];

  scat_cpu dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (mem_req.re)
      mem_rdata <= {mem[mem_req.addr % MEMB], mem[(mem_req.addr + 1) % MEMB],
                    mem[(mem_req.addr + 2) % MEMB], mem[(mem_req.addr + 3) % MEMB]};
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic put(int addr, word_t w);
    for (int k = 0; k < 4; k++) mem[(addr + k) % MEMB] = w[31 - 8*k -: 8];
  endtask

  // Reset, run until halted, check the cycle count and return it.
  task automatic run(int n_instr);
    int cycles;
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    cycles = 0;
    while (!halted && cycles < 100000) begin
      @(negedge clk);
      cycles++;
    end
    // n instructions of 3 cycles, then fetch+decode of the halting word.
    cmp("cycles", 32'(cycles), 32'(3 * n_instr + 2));
    cmp("instr_count", instr_count, 32'(n_instr));
  endtask

  task automatic load_setup_and(word_t w);
    for (int i = 0; i < MEMB; i += 4) put(i, 32'h0);
    for (int i = 0; i < SETUP_LEN; i++) put(4 * i, setup_prog(i));
    put(4 * SETUP_LEN, w);
  endtask

  task automatic check_example_except(int r_changed, word_t v);
    for (int r = 1; r < 15; r++) begin
      dbg_reg_sel = 4'(r); #1;
      cmp($sformatf("R%0d", r), dbg_reg_data, (r == r_changed) ? v : example_reg(r));
    end
    dbg_reg_sel = 0; #1;
    cmp("R0", dbg_reg_data, 32'h0);
  endtask

  initial begin
    logic [31:0] regs [16];
    int n;
    dbg_reg_sel = 0;
    mem_rdata = 0;

    // Worked single instructions after the register-setting program.
    load_setup_and(32'h10538123); run(SETUP_LEN + 1);
    check_example_except(5, 32'h129);                 // R5 = R3 + R8
    cmp("pc", pc, 32'(4 * SETUP_LEN + 4));            // PC stays on the halting word
    load_setup_and(32'h10340000); run(SETUP_LEN + 1);
    check_example_except(3, 32'h10);                  // R3 = R4 + R0
    load_setup_and(32'h1066D000); run(SETUP_LEN + 1);
    check_example_except(6, 32'h10);                  // R6 = R6 + R13
    load_setup_and(32'h11261000); run(SETUP_LEN + 1);
    check_example_except(2, 32'h8);                   // R2 = R6 - R1
    load_setup_and(32'h11189000); run(SETUP_LEN + 1);
    check_example_except(1, 32'h104);                 // R1 = R8 - R9
    load_setup_and(32'h17381000); run(SETUP_LEN + 1); // xor r3, r8, r1
    check_example_except(3, 32'hF8);
    load_setup_and(32'h10012000); run(SETUP_LEN + 1); // add r0, r1, r2: ignored
    check_example_except(0, 32'h0);

    // R15 as a source and as a destination.
    for (int i = 0; i < MEMB; i += 4) put(i, 32'h0);
    put(0,  ri(ADD, 1, 0, 5));        // 0x00 r1 = 5
    put(4,  rr(ADD, 2, 15, 0));       // 0x04 r2 = pc = 4
    put(8,  ri(ADD, 15, 0, 'h20));    // 0x08 pc = 0x20, next instr at 0x24
    put(12, ri(ADD, 3, 0, 99));       // skipped
    put('h24, ri(ADD, 4, 15, 0));     // 0x24 r4 = 0x24
    put('h28, 32'h0);
    run(4);
    dbg_reg_sel = 1; #1; cmp("r1", dbg_reg_data, 32'd5);
    dbg_reg_sel = 2; #1; cmp("r2 = pc", dbg_reg_data, 32'd4);
    dbg_reg_sel = 3; #1; cmp("r3 skipped", dbg_reg_data, 32'd0);
    dbg_reg_sel = 4; #1; cmp("r4 = pc after jump", dbg_reg_data, 32'h24);

    // Random programs against the instruction-set model.
    for (int prog = 0; prog < 20; prog++) begin
      for (int i = 0; i < MEMB; i += 4) put(i, 32'h0);
      for (int r = 0; r < 16; r++) regs[r] = 0;
      n = 40 + prog;
      for (int i = 0; i < n; i++) begin
        int rd;
        logic [31:0] w;
        rd = $urandom_range(0, 14);
        if ($urandom_range(0, 1))
          w = rr($urandom_range(0, 7), rd, $urandom_range(0, 15), $urandom_range(0, 15));
        else
          w = ri($urandom_range(0, 7), rd, $urandom_range(0, 15),
                 ($urandom_range(0, 3) == 0) ? $urandom_range(0, 15) : $urandom);
        put(4 * i, w);
        void'(iss_step(regs, w));
      end
      run(n);
      for (int r = 0; r < 16; r++) begin
        dbg_reg_sel = 4'(r); #1;
        cmp($sformatf("prog %0d R%0d", prog, r), dbg_reg_data, regs[r]);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
