// tb_multiplier_tree: checks that tree_sum + tree_carry = a*b + c (mod 2^64)
// for two's complement a, b, with extreme and random operands. The expected
// value is computed with 64-bit signed arithmetic in the testbench.
module tb_multiplier_tree;
  logic [31:0] a, b;
  logic [63:0] c, tree_sum, tree_carry;
  int checks = 0, failures = 0;

  multiplier_tree dut (.a, .b, .c, .tree_sum, .tree_carry);

  task automatic try(input logic [31:0] av, input logic [31:0] bv, input logic [63:0] cv);
    logic [63:0] expv;
    a = av; b = bv; c = cv;
    #1ns;
    expv = 64'(longint'(signed'(av)) * longint'(signed'(bv))) + cv;
    checks++;
    if (tree_sum + tree_carry != expv) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h got=%h exp=%h", av, bv, cv, tree_sum + tree_carry, expv);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ext [6];
    ext = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000, 32'hAAAA_AAAA};
    foreach (ext[i]) foreach (ext[j]) begin
      try(ext[i], ext[j], 64'h0);
      try(ext[i], ext[j], 64'hFFFF_FFFF_FFFF_FFFF);
    end
    for (int i = 0; i < 2000; i++) try($urandom, $urandom, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
