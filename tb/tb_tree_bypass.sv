// tb_tree_bypass: checks that latch_tree = 0 passes the tree value and
// latch_tree = 1 passes the pipeline register value.
module tb_tree_bypass;
  logic        latch_tree;
  logic [63:0] tree_val, reg_val, adder_val;
  int checks = 0, failures = 0;

  tree_bypass dut (.latch_tree, .tree_val, .reg_val, .adder_val);

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      tree_val   = {$urandom, $urandom};
      reg_val    = ~tree_val ^ 64'({$urandom});
      latch_tree = 1'(i);
      #1ns;
      checks++;
      if (adder_val != (latch_tree ? reg_val : tree_val)) begin
        failures++;
        $display("FAIL latch_tree=%b got=%h", latch_tree, adder_val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
