// tb_final_adder: checks the 64-bit carry-select adder against a + b
// (mod 2^64), including carries that cross every 16-bit segment boundary.
module tb_final_adder;
  logic [63:0] carry_vec, sum_vec, result;
  int checks = 0, failures = 0;

  final_adder dut (.carry_vec, .sum_vec, .result);

  task automatic try(input logic [63:0] x, input logic [63:0] y);
    carry_vec = x; sum_vec = y;
    #1ns;
    checks++;
    if (result != x + y) begin
      failures++;
      $display("FAIL %h + %h got=%h exp=%h", x, y, result, x + y);
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
    try(64'hFFFF_FFFF_FFFF_FFFF, 64'h1);
    try(64'h0000_0000_0000_FFFF, 64'h1);
    try(64'h0000_0000_FFFF_FFFF, 64'h1);
    try(64'h0000_FFFF_FFFF_FFFF, 64'h1);
    try(64'h0000_FFFF_0000_FFFF, 64'h0000_0000_0000_0001);
    try(64'h0001_0000_FFFF_0000, 64'h0000_0000_0001_0000);
    try(64'h8000_8000_8000_8000, 64'h8000_8000_8000_8000);
    for (int i = 0; i < 3000; i++) try({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
