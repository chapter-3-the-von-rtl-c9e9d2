// tb_scat_memory: self-checking test of the byte-addressed SCAT memory.
//
// Writes words and reads them back one cycle later, checks the big-endian
// byte order through unaligned reads (a word written at 0 read from address
// 1 shows its lower three bytes first), wrap-around at the top address, that
// rdata holds between reads and random traffic against a byte-array model.
module tb_scat_memory;
  import scat_pkg::*;

  localparam int unsigned BYTES = 256;

  logic clk = 0;
  mem_req_t req;
  word_t rdata;
  int checks = 0, failures = 0;
  logic [7:0] model [BYTES];

  scat_memory #(.MEM_BYTES(BYTES)) dut (.clk, .req, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int addr, word_t d);
    @(negedge clk);
    req = '0; req.we = 1; req.addr = 32'(addr); req.wdata = d;
    @(posedge clk);
    for (int k = 0; k < 4; k++) model[(addr + k) % BYTES] = d[31 - 8*k -: 8];
    @(negedge clk);
    req = '0;
  endtask

  function automatic word_t model_word(int addr);
    return {model[addr % BYTES], model[(addr + 1) % BYTES],
            model[(addr + 2) % BYTES], model[(addr + 3) % BYTES]};
  endfunction

  task automatic rd_check(int addr, word_t exp);
    @(negedge clk);
    req = '0; req.re = 1; req.addr = 32'(addr);
    @(posedge clk);
    @(negedge clk);
    req = '0;
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL read %0d: got %h expected %h", addr, rdata, exp);
    end
  endtask

  initial begin
    req = '0;
    for (int a = 0; a < BYTES; a += 4) wr(a, 32'h0);
    // The listing example: 20100006 at 0, 20200007 at 4, 12312000 at 8.
    wr(0, 32'h20100006);
    wr(4, 32'h20200007);
    wr(8, 32'h12312000);
    rd_check(0, 32'h20100006);
    rd_check(4, 32'h20200007);
    rd_check(8, 32'h12312000);
    // Byte order: bytes 20 10 00 06 | 20 20 00 07 -> word at 1 is 10000620.
    rd_check(1, 32'h10000620);
    rd_check(2, 32'h00062020);
    rd_check(3, 32'h06202000);
    // rdata holds with no read.
    repeat (3) @(posedge clk);
    #1; checks++;
    if (rdata !== 32'h06202000) begin failures++; $display("FAIL hold"); end
    // Wrap-around.
    wr(BYTES - 2, 32'hA1B2C3D4);
    rd_check(BYTES - 2, 32'hA1B2C3D4);
    rd_check(0, {8'hC3, 8'hD4, 8'h00, 8'h06});
    // Random traffic.
    for (int n = 0; n < 2000; n++) begin
      int a;
      a = $urandom_range(0, BYTES - 1);
      if ($urandom_range(0, 1)) wr(a, $urandom);
      else rd_check(a, model_word(a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
