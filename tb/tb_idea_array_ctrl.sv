// tb_idea_array_ctrl: checks the sequencer with a small internal array of
// 32 characters (4 blocks), so that jobs need several array-fulls. The
// controller is connected to the internal array, the key schedule, the
// pipelined core and a behavioural model of the memory bank; the testbench
// plays the host.
// Jobs: 0 blocks, 1 block, exactly one array (4), 11 blocks (three
// batches, the last one partial), and a decryption job that must give back
// the plaintext. For each job it checks every result word against the
// reference cipher, that the words around the data are untouched, that the
// bank saw exactly 5 + 2N reads and 2N writes, the status bits, and that a
// start command sent while busy is ignored.
module tb_idea_array_ctrl;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  localparam int unsigned ARRAY_CHARS = 32;
  localparam int unsigned MEM_AW      = 19;
  localparam int unsigned WORDS       = 256;
  localparam int unsigned AW          = 2;

  logic              clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;             // a real falling edge for the asynchronous reset
  logic              ctrl_wr = 1'b0;
  logic [7:0]        ctrl_data = '0;
  logic [7:0]        status;
  logic [MEM_AW-1:0] mem_addr;
  logic              mem_rd, mem_wr;
  logic [31:0]       mem_wdata, mem_rdata;
  logic              ks_start, ks_decrypt, ks_done;
  key_t              ks_key;
  subkeys_t          subkeys;
  logic              arr_we;
  logic [AW-1:0]     arr_waddr, arr_raddr;
  block_t            arr_wdata, arr_rdata;
  logic              core_in_valid, core_in_ready, core_out_valid;
  block_t            core_in_block, core_out_block;
  int checks = 0, failures = 0;

  idea_array_ctrl #(.ARRAY_CHARS(ARRAY_CHARS), .MEM_AW(MEM_AW)) dut (.*);
  idea_int_array #(.ARRAY_CHARS(ARRAY_CHARS)) u_array (
    .clk, .we(arr_we), .waddr(arr_waddr), .wdata(arr_wdata), .raddr(arr_raddr), .rdata(arr_rdata));
  idea_keysched u_ks (
    .clk, .rst_n, .start(ks_start), .decrypt(ks_decrypt), .key(ks_key), .busy(), .done(ks_done), .subkeys);
  idea_pipe_core u_core (
    .clk, .rst_n, .subkeys, .in_valid(core_in_valid), .in_block(core_in_block), .in_ready(core_in_ready),
    .out_valid(core_out_valid), .out_block(core_out_block));
  rc1000_mem_model #(.AW(MEM_AW), .WORDS(WORDS)) u_mem (
    .clk, .addr(mem_addr), .rd(mem_rd), .wr(mem_wr), .wdata(mem_wdata), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic command(logic [7:0] c);
    @(negedge clk); ctrl_wr = 1'b1; ctrl_data = c;
    @(negedge clk); ctrl_wr = 1'b0;
  endtask

  // Runs one job of n blocks; `in` is the input, `exp` the expected output.
  task automatic job(key_t key, bit dec, int n, block_t in [], block_t exp []);
    int unsigned r0, w0;
    int          cyc;
    for (int i = 0; i < WORDS; i++) u_mem.mem[i] = 32'hA5A5_0000 + i;
    u_mem.mem[0] = key[127:96]; u_mem.mem[1] = key[95:64];
    u_mem.mem[2] = key[63:32];  u_mem.mem[3] = key[31:0];
    u_mem.mem[4] = {dec, 7'b0, 24'(n)};
    for (int k = 0; k < n; k++) begin
      u_mem.mem[8+2*k] = in[k][63:32];
      u_mem.mem[9+2*k] = in[k][31:0];
    end
    r0 = u_mem.n_reads; w0 = u_mem.n_writes;
    command(8'h01);
    check(status[0] == 1'b1 && status[1] == 1'b0, "busy after start");
    command(8'h01);                     // ignored while busy
    cyc = 0;
    while (status[0] && cyc < 20000) begin @(negedge clk); cyc++; end
    check(status == 8'h02, $sformatf("status %h at the end of a job of %0d", status, n));
    check(u_mem.n_reads - r0 == 5 + 2*n, $sformatf("reads %0d for %0d blocks", u_mem.n_reads - r0, n));
    check(u_mem.n_writes - w0 == 2*n, $sformatf("writes %0d for %0d blocks", u_mem.n_writes - w0, n));
    for (int k = 0; k < n; k++)
      check({u_mem.mem[8+2*k], u_mem.mem[9+2*k]} == exp[k],
            $sformatf("block %0d = %h, expected %h", k, {u_mem.mem[8+2*k], u_mem.mem[9+2*k]}, exp[k]));
    for (int i = 5; i < 8; i++) check(u_mem.mem[i] == 32'hA5A5_0000 + i, "header gap untouched");
    for (int i = 8 + 2*n; i < WORDS; i++)
      if (u_mem.mem[i] != 32'hA5A5_0000 + i) check(1'b0, $sformatf("word %0d beyond the data changed", i));
  endtask

  initial begin
    key_t   key;
    keys_t  ek;
    block_t pt [], ct [];
    int     sizes [4] = '{0, 1, 4, 11};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(status == 8'h00, "idle status after reset");
    command(8'h07);                     // not a start command
    check(status == 8'h00, "unknown command ignored");
    foreach (sizes[s]) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      ek  = ref_enc_keys(key);
      pt  = new[sizes[s]];
      ct  = new[sizes[s]];
      foreach (pt[k]) begin
        pt[k] = {$urandom, $urandom};
        ct[k] = ref_cipher(pt[k], ek);
      end
      job(key, 1'b0, sizes[s], pt, ct);
      if (sizes[s] == 11) job(key, 1'b1, 11, ct, pt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
