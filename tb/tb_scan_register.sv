// tb_scan_register: checks parallel load, serial shift, scan_out (top bit)
// and asynchronous reset of the scan register against a model kept here.
module tb_scan_register;
  localparam int W = 64;
  logic         clk = 1'b0, rst_n, scan_en, scan_in;
  logic [W-1:0] d, q, model;
  logic         scan_out;
  int checks = 0, failures = 0, shifts = 0, loads = 0;

  scan_register dut (.clk, .rst_n, .scan_en, .scan_in, .d, .q, .scan_out);

  always #5ns clk = ~clk;

  task automatic check_state(input string what);
    checks++;
    if (q != model || scan_out != model[W-1]) begin
      failures++;
      $display("FAIL %s q=%h so=%b exp=%h", what, q, scan_out, model);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; scan_en = 1'b0; scan_in = 1'b0; d = '0;
    #12ns;
    model = '0;
    check_state("reset");
    rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      scan_en = ((i / 50) % 2) == 1;
      scan_in = 1'($urandom);
      d       = {$urandom, $urandom};
      @(posedge clk);
      if (scan_en) begin model = {model[W-2:0], scan_in}; shifts++; end
      else         begin model = d; loads++; end
      #1ns;
      check_state(scan_en ? "shift" : "load");
    end
    // asynchronous reset in mid-cycle
    @(negedge clk);
    #2ns rst_n = 1'b0;
    #1ns model = '0;
    check_state("async reset");
    $display("loads=%0d shifts=%0d", loads, shifts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
