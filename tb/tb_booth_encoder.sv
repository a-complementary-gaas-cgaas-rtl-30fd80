// tb_booth_encoder: checks the radix-4 Booth digit selection.
// For every one of the 8 bit triples and many random and extreme multiplicands
// it checks that the selected partial product plus the neg bit equals
// d*A, where d = -2*b[2i+1] + b[2i] + b[2i-1] is worked out here.
module tb_booth_encoder;
  localparam int W = 32;
  logic [2:0]   bits;
  logic [W-1:0] a;
  logic [W:0]   pp;
  logic         neg;
  int checks = 0, failures = 0;

  booth_encoder dut (.bits, .a, .pp, .neg);

  task automatic try(input logic [W-1:0] av);
    longint d, expv, got;
    a = av;
    for (int t = 0; t < 8; t++) begin
      bits = 3'(t);
      #1ns;
      d    = -2 * longint'(t >> 2 & 1) + longint'(t >> 1 & 1) + longint'(t & 1);
      expv = d * longint'(signed'(av));
      got  = longint'(signed'(pp)) + longint'(neg);
      checks++;
      if (got != expv) begin
        failures++;
        $display("FAIL a=%h bits=%b got=%0d exp=%0d", av, bits, got, expv);
      end
    end
  endtask

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(32'h0000_0000);
    try(32'h0000_0001);
    try(32'hFFFF_FFFF);
    try(32'h7FFF_FFFF);
    try(32'h8000_0000);
    for (int i = 0; i < 200; i++) try($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
