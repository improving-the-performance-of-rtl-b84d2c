// idea_fpga_top: IDEA encryption/decryption FPGA, phase-pipelined core with
// an internal array (the configuration with the highest throughput).
//
// The host and the FPGA exchange data only through a 32-bit memory bank of
// the board; the host starts a job and watches its progress through 8-bit
// control and status ports. Inside the FPGA:
//   idea_array_ctrl  reads key and job size, copies the data between the
//                    bank and the internal array and feeds the core;
//   idea_int_array   1200-character (150-block) buffer;
//   idea_keysched    encryption or decryption subkeys from the 128-bit key;
//   idea_pipe_core   8 phases + transformation phase, one block every
//                    8 cycles, 72 cycles latency.
// The memory bank and the host are outside this module; their signals are
// its ports. The bank is expected to behave as a synchronous SRAM with read
// data one cycle after mem_rd (see idea_array_ctrl for the memory layout
// and the command/status encodings, which are this design's own).
//
// Timing of one job of N blocks, B = ceil(N / 150) batches: 5 header reads,
// key schedule (1 cycle to encrypt, 559 to decrypt), then per batch of n
// blocks about 2n + 2 cycles to fill, 8n + 66 to 8n + 74 to compute and 2n + 1 to
// drain.
module idea_fpga_top
  import idea_pkg::*;
#(
  parameter int unsigned ARRAY_CHARS = 1200,
  parameter int unsigned MEM_AW      = 19,
  localparam int unsigned DEPTH      = ARRAY_CHARS / (BLOCK_W / 8),
  localparam int unsigned AW         = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // control port (host to FPGA) and status port (FPGA to host)
  input  logic              ctrl_wr,
  input  logic [7:0]        ctrl_data,
  output logic [7:0]        status,
  // memory bank
  output logic [MEM_AW-1:0] mem_addr,
  output logic              mem_rd,
  output logic              mem_wr,
  output logic [31:0]       mem_wdata,
  input  logic [31:0]       mem_rdata
);
  logic     ks_start, ks_decrypt, ks_done;
  key_t     ks_key;
  subkeys_t subkeys;

  logic          arr_we;
  logic [AW-1:0] arr_waddr, arr_raddr;
  block_t        arr_wdata, arr_rdata;

  logic   core_in_valid, core_in_ready, core_out_valid;
  block_t core_in_block, core_out_block;

  idea_array_ctrl #(
    .ARRAY_CHARS(ARRAY_CHARS),
    .MEM_AW     (MEM_AW)
  ) u_ctrl (
    .clk, .rst_n,
    .ctrl_wr, .ctrl_data, .status,
    .mem_addr, .mem_rd, .mem_wr, .mem_wdata, .mem_rdata,
    .ks_start, .ks_decrypt, .ks_key, .ks_done,
    .arr_we, .arr_waddr, .arr_wdata, .arr_raddr, .arr_rdata,
    .core_in_valid, .core_in_block, .core_in_ready,
    .core_out_valid, .core_out_block
  );

  idea_int_array #(.ARRAY_CHARS(ARRAY_CHARS)) u_array (
    .clk,
    .we   (arr_we),
    .waddr(arr_waddr),
    .wdata(arr_wdata),
    .raddr(arr_raddr),
    .rdata(arr_rdata)
  );

  idea_keysched u_keysched (
    .clk, .rst_n,
    .start  (ks_start),
    .decrypt(ks_decrypt),
    .key    (ks_key),
    .busy   (),
    .done   (ks_done),
    .subkeys(subkeys)
  );

  idea_pipe_core u_core (
    .clk, .rst_n,
    .subkeys  (subkeys),
    .in_valid (core_in_valid),
    .in_block (core_in_block),
    .in_ready (core_in_ready),
    .out_valid(core_out_valid),
    .out_block(core_out_block)
  );
endmodule
