// tb_cla16: checks {cout, sum} = a + b + cin for the 16-bit lookahead adder
// on carry-chain corner cases and random operands.
module tb_cla16;
  logic [15:0] a, b, sum;
  logic        cin, cout;
  int checks = 0, failures = 0;

  cla16 dut (.a, .b, .cin, .sum, .cout);

  task automatic try(input logic [15:0] av, input logic [15:0] bv, input logic ci);
    logic [16:0] expv;
    a = av; b = bv; cin = ci;
    #1ns;
    expv = 17'(av) + 17'(bv) + 17'(ci);
    checks++;
    if ({cout, sum} != expv) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got=%h exp=%h", av, bv, ci, {cout, sum}, expv);
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
    try(16'hFFFF, 16'h0000, 1'b1);
    try(16'hFFFF, 16'h0001, 1'b0);
    try(16'hFFFF, 16'hFFFF, 1'b1);
    try(16'h0F0F, 16'h00F1, 1'b0);
    try(16'h0000, 16'h0000, 1'b0);
    for (int i = 0; i < 3000; i++) try(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
