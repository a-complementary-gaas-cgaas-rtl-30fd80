// tb_dcvsl_xor: checks the DCVSL XOR cell model over all input pairs:
// both outputs low in precharge, both still low just before the 428 ps
// evaluation delay, the right rail high just after it, and the result held
// by the keepers through a long evaluate phase.
module tb_dcvsl_xor;
  logic CLK, A, AB, B, BB, OUT, OUTB;
  int checks = 0, failures = 0;

  dcvsl_xor dut (.CLK, .A, .AB, .B, .BB, .OUT, .OUTB);

  task automatic expect2(input logic eo, input logic eob, input string what);
    checks++;
    if (OUT != eo || OUTB != eob) begin
      failures++;
      $display("FAIL %s A=%b B=%b OUT=%b OUTB=%b exp %b %b", what, A, B, OUT, OUTB, eo, eob);
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
    CLK = 1'b0; A = 1'b0; AB = 1'b1; B = 1'b0; BB = 1'b1;
    for (int r = 0; r < 3; r++) begin
      for (int v = 0; v < 4; v++) begin
        CLK = 1'b0;
        A = v[1]; AB = ~v[1]; B = v[0]; BB = ~v[0];
        #1ns;
        expect2(1'b0, 1'b0, "precharge");
        CLK = 1'b1;
        #400ps;
        expect2(1'b0, 1'b0, "before evaluation delay");
        #50ps;
        expect2(v[1] ^ v[0], ~(v[1] ^ v[0]), "evaluate");
        #20ns;
        expect2(v[1] ^ v[0], ~(v[1] ^ v[0]), "keeper hold");
      end
    end
    CLK = 1'b0;
    #1ns;
    expect2(1'b0, 1'b0, "final precharge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
