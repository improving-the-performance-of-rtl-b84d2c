// tb_idea_keysched: compares the encryption and decryption subkeys of the
// key schedule with the reference for the published test key, an all-zero
// key (its subkeys are 0 = 2^16, inverse of itself), an all-ones key and 20
// random keys in each mode. Checks the cycle counts too: encryption subkeys
// one cycle after start, decryption subkeys 559 cycles after start (one
// cycle to set up, then 18 inverses of 31 cycles each).
module tb_idea_keysched;
  import idea_pkg::*;
  import idea_ref_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;             // a real falling edge for the asynchronous reset
  logic     start = 1'b0, decrypt = 1'b0;
  key_t     key = '0;
  logic     busy, done;
  subkeys_t subkeys;
  int checks = 0, failures = 0;

  idea_keysched dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(key_t k, logic dec);
    keys_t exp;
    int    cyc;
    exp = ref_enc_keys(k);
    if (dec) exp = ref_dec_keys(exp);
    @(negedge clk);
    key = k; decrypt = dec; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
    checks += 3;
    if (subkeys !== exp) begin
      failures++;
      for (int i = 0; i < 52; i++)
        if (subkeys[i] !== exp[i] && failures < 5) $display("FAIL dec=%b key %h z[%0d]=%h exp %h", dec, k, i, subkeys[i], exp[i]);
    end
    if (cyc != (dec ? 559 : 1)) begin
      failures++;
      $display("FAIL dec=%b took %0d cycles", dec, cyc);
    end
    @(negedge clk);
    if (busy || done) failures++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int dec = 0; dec < 2; dec++) begin
      run(128'h0001_0002_0003_0004_0005_0006_0007_0008, dec[0]);
      run('0, dec[0]);
      run('1, dec[0]);
      for (int i = 0; i < 20; i++) run({$urandom, $urandom, $urandom, $urandom}, dec[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
