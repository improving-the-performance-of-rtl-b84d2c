// idea_int_array: the internal array, an on-chip buffer of 64-bit blocks.
//
// It sits between the board's memory bank and the computation module so
// that moving data and ciphering it are separate activities. Its size is
// given in characters (bytes), 1200 by default as in the published
// phase-pipelined version, and it holds ARRAY_CHARS/8 = 150 blocks.
//
// Written as a simple dual-port memory: one write port and one read port,
// both synchronous. A read returns the word at `raddr` on the clock edge
// after the address is presented; a read of the address written in the same
// cycle returns the old contents. The port structure and read latency are
// this design's choices.
module idea_int_array
  import idea_pkg::*;
#(
  parameter int unsigned ARRAY_CHARS = 1200,
  localparam int unsigned DEPTH      = ARRAY_CHARS / (BLOCK_W / 8),
  localparam int unsigned AW         = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  block_t        wdata,
  input  logic [AW-1:0] raddr,
  output block_t        rdata
);
  block_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
