// tb_compressor_4_2: exhaustive check of one 4:2 compressor bit.
// For all 32 input combinations it checks the arithmetic identity
// x0+x1+x2+x3+cin = sum + 2*(carry+cout), and that cout does not depend on
// cin (the property that stops lateral carries from rippling).
module tb_compressor_4_2;
  logic [3:0] x;
  logic       cin, sum, carry, cout;
  logic       cout0;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.x, .cin, .sum, .carry, .cout);

  initial begin
    #1000ns;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int ci = 0; ci < 2; ci++) begin
        x = 4'(v); cin = 1'(ci);
        #1ns;
        checks++;
        if (int'(x[0]) + int'(x[1]) + int'(x[2]) + int'(x[3]) + ci
            != int'(sum) + 2 * (int'(carry) + int'(cout))) begin
          failures++;
          $display("FAIL x=%b cin=%0d sum=%0d carry=%0d cout=%0d", x, ci, sum, carry, cout);
        end
        if (ci == 0) cout0 = cout;
        else begin
          checks++;
          if (cout != cout0) begin
            failures++;
            $display("FAIL cout depends on cin for x=%b", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
