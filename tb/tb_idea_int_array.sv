// tb_idea_int_array: fills the 150-block internal array with random blocks,
// reads every entry back (one cycle read latency), rewrites a random half
// while reading other entries in the same cycles, and checks again against a
// shadow copy kept by the testbench. Also checks that a read of the entry
// being written in the same cycle returns the old contents.
module tb_idea_int_array;
  import idea_pkg::*;

  localparam int unsigned DEPTH = 150;
  localparam int unsigned AW    = 8;

  logic          clk = 1'b0;
  logic          we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  block_t        wdata = '0, rdata;
  block_t        shadow [DEPTH];
  int checks = 0, failures = 0;

  idea_int_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); raddr = AW'(i);
      @(negedge clk);
      checks++;
      if (rdata !== shadow[i]) begin
        failures++;
        if (failures < 10) $display("FAIL [%0d] %h exp %h", i, rdata, shadow[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = {$urandom, $urandom}; shadow[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    check_all();
    for (int i = 0; i < DEPTH; i++) begin
      int r;
      block_t old;
      r = $urandom_range(0, DEPTH-1);
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1); waddr = AW'(i); wdata = {$urandom, $urandom};
      raddr = (i % 4 == 0) ? AW'(i) : AW'(r);
      old = shadow[raddr];
      if (we) shadow[i] = wdata;
      @(negedge clk);
      we = 1'b0;
      checks++;
      if (rdata !== old) failures++;
    end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
