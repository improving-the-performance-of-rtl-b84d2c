// rc1000_mem_model: behavioural model of one 32-bit memory bank of the
// FPGA board, as seen from the FPGA. Synchronous SRAM: a write takes effect
// at the clock edge; read data appear on rdata after the edge that samples
// mem_rd and stay until the next read. Size WORDS words. The host side is
// modelled by testbenches writing and reading `mem` directly while the FPGA
// is idle. Counts reads and writes so that tests can check the number of
// accesses per block.
module rc1000_mem_model #(
  parameter int unsigned AW    = 19,
  parameter int unsigned WORDS = 1 << 19
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          rd,
  input  logic          wr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] mem [WORDS];
  int unsigned n_reads  = 0;
  int unsigned n_writes = 0;

  always @(posedge clk) begin
    if (wr) begin
      if (32'(addr) < WORDS) mem[addr] <= wdata;
      n_writes <= n_writes + 1;
    end
    if (rd) begin
      rdata   <= (32'(addr) < WORDS) ? mem[addr] : 32'hDEAD_BEEF;
      n_reads <= n_reads + 1;
    end
  end
endmodule
