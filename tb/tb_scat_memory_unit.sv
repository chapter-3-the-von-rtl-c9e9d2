// tb_scat_memory_unit: self-checking test of the processor's memory unit.
//
// Checks that fetch puts the PC on the address bus with a read strobe and
// no write, that no strobe is raised otherwise, that ir_load captures the
// read data, that the instruction register holds it otherwise and that
// reset clears it.
module tb_scat_memory_unit;
  import scat_pkg::*;

  logic clk = 0, rst_n = 0, fetch, ir_load;
  word_t pc, mem_rdata, ir;
  mem_req_t mem_req;
  int checks = 0, failures = 0;

  scat_memory_unit dut (.*);

  always #5 clk = ~clk;

  task automatic cmp(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t held;
    fetch = 0; ir_load = 0; pc = 0; mem_rdata = 32'h1234_5678;
    @(posedge clk); #1;
    cmp("ir in reset", ir, 32'h0);
    rst_n = 1;
    held = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      fetch = $urandom_range(0, 1);
      ir_load = $urandom_range(0, 1);
      pc = $urandom & ~32'h3;
      mem_rdata = $urandom;
      #1;
      cmp("re", 32'(mem_req.re), 32'(fetch));
      cmp("we", 32'(mem_req.we), 32'h0);
      if (fetch) cmp("addr", mem_req.addr, pc);
      @(posedge clk); #1;
      if (ir_load) held = mem_rdata;
      cmp("ir", ir, held);
    end
    @(negedge clk); rst_n = 0; @(posedge clk); #1;
    cmp("ir after reset", ir, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
