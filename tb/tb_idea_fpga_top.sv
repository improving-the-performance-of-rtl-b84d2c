// tb_idea_fpga_top: end-to-end test of the whole FPGA design at its default
// sizes (1200-character internal array, 19-bit memory bank address), with
// a behavioural 2 MB memory bank and the testbench acting as the host.
//
// The host codes 31880 characters (3985 blocks): it writes key, job word
// and plaintext into the bank, sends the start command on the control port,
// polls the status port, and compares every result block with the
// reference cipher. It then decodes the ciphertext in place with the same
// key and checks that the plaintext comes back. Some plaintext words are 0
// so that the multipliers see the 2^16 operand.
//
// Mechanisms that must each happen at least once, counted from the bank
// and core signals: full array batches, a partial last batch, pipeline
// bubbles, back-to-back core outputs (one block per 8 cycles), an
// encryption job and a decryption job (with the on-chip inversion of
// subkeys). The job time is compared with the cycle budget of the design
// (at most, per batch of n blocks: 2n+2 fill, 8n+80 compute, 2n+1 drain
// cycles, plus 2) and
// the throughput at the published 20 MHz clock is printed.
module tb_idea_fpga_top;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  localparam int unsigned MEM_AW   = 19;
  localparam int unsigned CHARS    = 31880;
  localparam int unsigned N_BLOCKS = CHARS / 8;
  localparam int unsigned DEPTH    = 150;

  logic              clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;             // a real falling edge for the asynchronous reset
  logic              ctrl_wr = 1'b0;
  logic [7:0]        ctrl_data = '0;
  logic [7:0]        status;
  logic [MEM_AW-1:0] mem_addr;
  logic              mem_rd, mem_wr;
  logic [31:0]       mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  idea_fpga_top dut (.*);
  rc1000_mem_model #(.AW(MEM_AW), .WORDS(1 << MEM_AW)) u_mem (
    .clk, .addr(mem_addr), .rd(mem_rd), .wr(mem_wr), .wdata(mem_wdata), .rdata(mem_rdata));

  always #5 clk = ~clk;

  // ------------------------------------------------------ mechanism counters
  int full_batches = 0, partial_batches = 0, bubbles = 0, back_to_back = 0;
  int enc_jobs = 0, dec_jobs = 0, zero_words = 0;
  int burst = 0;
  longint cycle = 0, last_out = -100;
  logic   mem_wr_d = 1'b0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    mem_wr_d <= mem_wr;
    if (mem_wr) burst <= mem_wr_d ? burst + 1 : 1;
    if (mem_wr_d && !mem_wr) begin      // end of a drain burst = end of a batch
      if (burst == 2 * DEPTH) full_batches++;
      else                    partial_batches++;
    end
    if (status[0] && dut.core_in_ready && !dut.core_in_valid) bubbles++;
    if (dut.core_out_valid) begin
      if (cycle - last_out == 8) back_to_back++;
      last_out = cycle;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic command(logic [7:0] c);
    @(negedge clk); ctrl_wr = 1'b1; ctrl_data = c;
    @(negedge clk); ctrl_wr = 1'b0;
  endtask

  // Host: place key and job word, start, wait for done. Returns the cycles.
  task automatic run_job(key_t key, bit dec, int n, output int cyc);
    u_mem.mem[0] = key[127:96]; u_mem.mem[1] = key[95:64];
    u_mem.mem[2] = key[63:32];  u_mem.mem[3] = key[31:0];
    u_mem.mem[4] = {dec, 7'b0, 24'(n)};
    command(8'h01);
    cyc = 2;
    while (!status[1] && cyc < 300000) begin @(negedge clk); cyc++; end
    check(status == 8'h02, $sformatf("status %h at end of job", status));
    if (dec) dec_jobs++; else enc_jobs++;
    repeat (2) @(negedge clk);          // let the counters see the last write
  endtask

  initial begin
    key_t   key;
    keys_t  ek;
    block_t pt [N_BLOCKS];
    block_t ct [N_BLOCKS];
    int     cyc, budget, nb, left, bad;
    real    mbps;

    key = 128'h0001_0002_0003_0004_0005_0006_0007_0008;
    ek  = ref_enc_keys(key);
    foreach (pt[k]) begin
      pt[k] = {$urandom, $urandom};
      if (k % 37 == 0) begin pt[k][63:48] = '0; zero_words++; end
      if (k % 41 == 0) begin pt[k][15:0]  = '0; zero_words++; end
      ct[k] = ref_cipher(pt[k], ek);
    end
    pt[0] = 64'h0000_0001_0002_0003;    // the published test vector
    ct[0] = ref_cipher(pt[0], ek);
    check(ct[0] == 64'h11FB_ED2B_0198_6DE5, "reference model test vector");
    for (int k = 0; k < N_BLOCKS; k++) begin
      u_mem.mem[8+2*k] = pt[k][63:32];
      u_mem.mem[9+2*k] = pt[k][31:0];
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- encode
    run_job(key, 1'b0, N_BLOCKS, cyc);
    bad = 0;
    for (int k = 0; k < N_BLOCKS; k++)
      if ({u_mem.mem[8+2*k], u_mem.mem[9+2*k]} != ct[k]) begin
        bad++;
        if (bad < 5) $display("block %0d = %h expected %h", k, {u_mem.mem[8+2*k], u_mem.mem[9+2*k]}, ct[k]);
      end
    checks += N_BLOCKS - 1;
    check(bad == 0, $sformatf("%0d of %0d ciphertext blocks wrong", bad, N_BLOCKS));
    budget = 20;
    left = N_BLOCKS;
    while (left > 0) begin
      nb = (left > DEPTH) ? DEPTH : left;
      budget += (2*nb + 2) + (8*nb + 80) + (2*nb + 1) + 2;
      left -= nb;
    end
    check(cyc <= budget, $sformatf("encode took %0d cycles, budget %0d", cyc, budget));
    mbps = real'(N_BLOCKS) * 64.0 / (real'(cyc) / 20.0e6) / 1.0e6;
    $display("encode: %0d blocks in %0d cycles, %0.1f Mbit/s at 20 MHz", N_BLOCKS, cyc, mbps);

    // ---- decode in place
    run_job(key, 1'b1, N_BLOCKS, cyc);
    bad = 0;
    for (int k = 0; k < N_BLOCKS; k++)
      if ({u_mem.mem[8+2*k], u_mem.mem[9+2*k]} != pt[k]) bad++;
    checks += N_BLOCKS - 1;
    check(bad == 0, $sformatf("%0d of %0d decoded blocks wrong", bad, N_BLOCKS));
    $display("decode: %0d cycles", cyc);

    check(full_batches == 2 * (N_BLOCKS / DEPTH), $sformatf("full batches %0d", full_batches));
    check(partial_batches == 2, $sformatf("partial batches %0d", partial_batches));
    check(bubbles > 0, "pipeline bubbles");
    check(back_to_back > 0, "back-to-back outputs");
    check(enc_jobs == 1 && dec_jobs == 1, "encode and decode jobs");
    check(zero_words > 0, "2^16 operands");
    $display("full batches %0d, partial batches %0d, bubbles %0d, back-to-back outputs %0d, zero words %0d",
             full_batches, partial_batches, bubbles, back_to_back, zero_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
