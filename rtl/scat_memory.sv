// scat_memory: the byte-addressed main memory holding program and data.
//
// The memory is an array of MEM_BYTES bytes, each with its own address.
// It is accessed one 32-bit word (four consecutive bytes) at a time, the most
// significant byte at the lowest address (big-endian), so the word 0x20100006
// at address 0 reads back as bytes 20 10 00 06 at addresses 0..3. A write
// (req.we) stores req.wdata at req.addr on the rising edge. A read (req.re)
// is synchronous: rdata shows the word one cycle later and holds it until the
// next read. Addresses wrap modulo MEM_BYTES, which must be a power of two.
// The byte array, the word-wide access and the byte order follow the SCAT
// machine; the size, the read latency and the wrap-around are this design's
// own choices. The contents are not reset.
module scat_memory
  import scat_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 4096
) (
  input  logic     clk,
  input  mem_req_t req,
  output word_t    rdata
);

  localparam int unsigned AW = $clog2(MEM_BYTES);

  logic [7:0] mem [MEM_BYTES];
  logic [AW-1:0] a0, a1, a2, a3;

  assign a0 = req.addr[AW-1:0];
  assign a1 = a0 + AW'(1);
  assign a2 = a0 + AW'(2);
  assign a3 = a0 + AW'(3);

  always_ff @(posedge clk) begin
    if (req.we) begin
      mem[a0] <= req.wdata[31:24];
      mem[a1] <= req.wdata[23:16];
      mem[a2] <= req.wdata[15:8];
      mem[a3] <= req.wdata[7:0];
    end
  end

  always_ff @(posedge clk) begin
    if (req.re) rdata <= {mem[a0], mem[a1], mem[a2], mem[a3]};
  end

  // Rule of the port: one access per cycle.
  always_ff @(posedge clk) begin
    assert (!(req.re && req.we))
      else $error("scat_memory: read and write in the same cycle");
  end

  initial begin
    assert (MEM_BYTES >= 4 && (MEM_BYTES & (MEM_BYTES - 1)) == 0)
      else $fatal(1, "scat_memory: MEM_BYTES must be a power of two");
  end

endmodule
