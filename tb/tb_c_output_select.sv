// tb_c_output_select: checks that each c_field value puts the right 16-bit
// field of the accumulator on c_output (0: bits 15..0 ... 3: bits 63..48).
module tb_c_output_select;
  logic [63:0] c;
  logic [1:0]  c_field;
  logic [15:0] c_output;
  logic [15:0] expv;
  int checks = 0, failures = 0;

  c_output_select dut (.c, .c_field, .c_output);

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 100; i++) begin
      c = (i == 0) ? 64'h4444_3333_2222_1111 : {$urandom, $urandom};
      for (int f = 0; f < 4; f++) begin
        c_field = 2'(f);
        #1ns;
        case (f)
          0: expv = c[15:0];
          1: expv = c[31:16];
          2: expv = c[47:32];
          default: expv = c[63:48];
        endcase
        checks++;
        if (c_output != expv) begin
          failures++;
          $display("FAIL c=%h field=%0d got=%h exp=%h", c, f, c_output, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
