// tb_scat_regfile: self-checking test of the SCAT register file.
//
// Checks reset values, that R0 reads zero and ignores writes, that R1-R14
// keep what is written, that R15 reads as the PC, advances by 4 on pc_inc,
// and that a write to R15 together with pc_inc yields (value + 4). A shadow
// model in the testbench is compared on all three read ports after random
// traffic.
module tb_scat_regfile;
  import scat_pkg::*;

  logic clk = 0, rst_n = 0;
  ridx_t rs1_addr, rs2_addr, waddr, dbg_sel;
  word_t rs1_data, rs2_data, wdata, pc, dbg_data;
  logic we, pc_inc;
  int checks = 0, failures = 0;
  word_t model [16];

  scat_regfile #(.RESET_PC(32'h0)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic compare_all();
    for (int r = 0; r < 16; r++) begin
      rs1_addr = 4'(r); rs2_addr = 4'(15 - r); dbg_sel = 4'(r);
      #1;
      cmp($sformatf("rs1 R%0d", r), rs1_data, model[r]);
      cmp($sformatf("rs2 R%0d", 15 - r), rs2_data, model[15 - r]);
      cmp($sformatf("dbg R%0d", r), dbg_data, model[r]);
    end
  endtask

  task automatic cycle(logic w, int a, word_t d, logic inc);
    @(negedge clk);
    we = w; waddr = 4'(a); wdata = d; pc_inc = inc;
    @(posedge clk);
    #1;
    if (w && a != 0 && a != 15) model[a] = d;
    if (inc) model[15] = ((w && a == 15) ? d : model[15]) + 32'd4;
    else if (w && a == 15) model[15] = d;
    we = 0; pc_inc = 0;
  endtask

  initial begin
    we = 0; pc_inc = 0; waddr = 0; wdata = 0; rs1_addr = 0; rs2_addr = 0; dbg_sel = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 16; r++) model[r] = '0;
    compare_all();
    // R0 ignores writes.
    cycle(1, 0, 32'hDEAD_BEEF, 0);
    rs1_addr = 0; #1; cmp("R0 after write", rs1_data, 32'h0);
    // Plain writes to R1..R14.
    for (int r = 1; r < 15; r++) cycle(1, r, 32'h1000 * r + 32'h11, 0);
    compare_all();
    // PC increments.
    cycle(0, 0, 0, 1);
    cycle(0, 0, 0, 1);
    cmp("pc after two increments", pc, 32'd8);
    // Write to R15 together with the increment: next PC = value + 4.
    cycle(1, 15, 32'h100, 1);
    cmp("pc after write+inc", pc, 32'h104);
    // Write to a GPR with increment in the same cycle.
    cycle(1, 7, 32'h4321_5678, 1);
    cmp("pc", pc, 32'h108);
    compare_all();
    // Random traffic.
    for (int n = 0; n < 500; n++) begin
      cycle($urandom_range(0, 1), $urandom_range(0, 15), $urandom, $urandom_range(0, 1));
      if (n % 50 == 0) compare_all();
    end
    compare_all();
    // Reset again.
    @(negedge clk); rst_n = 0; @(posedge clk); #1; rst_n = 1;
    for (int r = 0; r < 16; r++) model[r] = '0;
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
