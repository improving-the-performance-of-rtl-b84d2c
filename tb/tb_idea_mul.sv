// tb_idea_mul: checks the modulo 2^16+1 multiplier against a reference that
// uses a full product and the % operator. Covers the zero (2^16) operand in
// either or both positions, 1, 2^16-1, and 200000 random operand pairs.
module tb_idea_mul;
  import idea_ref_pkg::*;

  logic [15:0] a, b, p;
  int checks = 0, failures = 0;

  idea_mul dut (.a(a), .b(b), .p(p));

  task automatic try(logic [15:0] x, logic [15:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (p !== ref_mul(x, y)) begin
      failures++;
      if (failures < 10) $display("FAIL %h (.) %h = %h, expected %h", x, y, p, ref_mul(x, y));
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] edges [6] = '{16'h0000, 16'h0001, 16'h0002, 16'h8000, 16'hFFFE, 16'hFFFF};
    foreach (edges[i]) foreach (edges[j]) try(edges[i], edges[j]);
    for (int i = 0; i < 200000; i++) try(16'($urandom), 16'($urandom));
    // A few identities: x (.) inverse(x) = 1.
    for (int i = 0; i < 1000; i++) begin
      logic [15:0] x;
      x = 16'($urandom);
      a = x; b = ref_inv(x); #1;
      checks++;
      if (p !== 16'd1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
