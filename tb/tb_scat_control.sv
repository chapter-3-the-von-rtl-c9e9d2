// tb_scat_control: self-checking test of the von Neumann cycle sequencer.
//
// Feeds legal decoded instructions and checks the step sequence
// FETCH, DECODE, EXECUTE (one cycle each, 3 cycles per instruction), the
// strobes of each step, that dec_q holds what was decoded in the DECODE
// step, the instruction count, and that an illegal opcode stops the
// sequencer in HALT until reset.
module tb_scat_control;
  import scat_pkg::*;

  logic clk = 0, rst_n = 0;
  decoded_t dec, dec_q;
  logic fetch, ir_load, execute, halted;
  cpu_state_e state;
  word_t instr_count;
  int checks = 0, failures = 0;

  scat_control dut (.*);

  always #5 clk = ~clk;

  task automatic cmp(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    decoded_t d;
    dec = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      // FETCH
      #1;
      cmp("state fetch", state, S_FETCH);
      cmp("fetch", fetch, 1); cmp("ir_load", ir_load, 0); cmp("execute", execute, 0);
      d = decoded_t'({$urandom, $urandom});
      d.illegal = 0;
      dec = decoded_t'({$urandom, $urandom});   // garbage outside DECODE
      dec.illegal = 0;
      @(negedge clk);
      // DECODE
      cmp("state decode", state, S_DECODE);
      cmp("fetch", fetch, 0); cmp("ir_load", ir_load, 1); cmp("execute", execute, 0);
      dec = d;
      @(negedge clk);
      // EXECUTE
      dec = decoded_t'({$urandom, $urandom});
      cmp("state execute", state, S_EXECUTE);
      cmp("execute", execute, 1); cmp("fetch", fetch, 0); cmp("ir_load", ir_load, 0);
      checks++;
      if (dec_q !== d) begin failures++; $display("FAIL dec_q %h expected %h", dec_q, d); end
      cmp("count", int'(instr_count), n);
      @(negedge clk);
      cmp("count after", int'(instr_count), n + 1);
    end
    // Illegal opcode: FETCH, DECODE with illegal -> HALT for good.
    @(negedge clk);
    dec = '0; dec.illegal = 1;
    @(negedge clk);
    dec = '0;
    repeat (5) begin
      cmp("halted", halted, 1);
      cmp("state halt", state, S_HALT);
      cmp("no fetch", fetch, 0);
      cmp("no execute", execute, 0);
      @(negedge clk);
    end
    cmp("count frozen", int'(instr_count), 50);
    rst_n = 0; @(negedge clk); rst_n = 1;
    cmp("fetch after reset", state, S_FETCH);
    cmp("count reset", int'(instr_count), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
