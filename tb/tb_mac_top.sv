// tb_mac_top: end-to-end test of the multiply-accumulate unit at its full
// size (32-bit operands, 64-bit accumulator).
//
// A register-level model kept here predicts the accumulator after every
// clock: the operand registers, the accumulator, and the sum of the two
// pipeline registers (the tree splits a*b + c into a redundant pair, so only
// their sum is predictable). The model uses plain 64-bit signed arithmetic.
// The test runs, and counts:
//   * one-cycle multiply-accumulates and plain multiplies (accumulate = 0),
//     one result per clock, operand-to-accumulator latency of two edges;
//   * two-stage pipelined operation (latch_tree = 1) and switches between
//     the two modes;
//   * a full 256-bit scan-out, comparing C, A, B and the tree's intermediate
//     sum/carry pair with the model;
//   * a scan-in of chosen values followed by one pipelined clock, so that the
//     final adder adds the scanned CarryRegister and SumRegister values;
//   * readout of all four 16-bit accumulator fields through c_output;
//   * a single running sum kept in pipelined mode by issuing accumulating
//     operations every other clock;
//   * the DCVSL XOR cell on the side ports.
// A mechanism that never happened counts as a failure.
module tb_mac_top;
  logic        clk = 1'b0, rst_n;
  logic [31:0] arg_a, arg_b;
  logic        accumulate, latch_tree, scan_en, scan_in, scan_out;
  logic [1:0]  c_field;
  logic [15:0] c_output;
  logic [63:0] c_value;
  logic        xor_clk, xor_a, xor_ab, xor_b, xor_bb, xor_out, xor_outb;

  int checks = 0, failures = 0;
  int n_mac = 0, n_mul = 0, n_pipe = 0, n_switch = 0, n_scan_out = 0, n_scan_in = 0,
      n_xor = 0, n_pipe_sum = 0;
  int n_field [4] = '{0, 0, 0, 0};

  // register-level model
  logic [31:0] m_a, m_b;
  logic [63:0] m_c, m_p;   // accumulator, CarryRegister + SumRegister
  logic        m_acc;      // latched accumulate control

  mac_top dut (.*);

  always #5ns clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] mac(input logic [31:0] a, input logic [31:0] b,
                                      input logic [63:0] c, input logic acc);
    return 64'(longint'(signed'(a)) * longint'(signed'(b))) + (acc ? c : 64'h0);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One normal (non-scan) clock with the given controls; updates the model
  // and checks the accumulator and one field of c_output afterwards.
  task automatic step(input logic [31:0] a, input logic [31:0] b,
                      input logic acc, input logic lt);
    logic [63:0] tree, nc;
    @(negedge clk);
    if (lt != latch_tree) n_switch++;
    arg_a = a; arg_b = b; accumulate = acc; latch_tree = lt; scan_en = 1'b0;
    c_field = 2'($urandom);
    tree = mac(m_a, m_b, m_c, m_acc);
    nc   = lt ? m_p : tree;
    if (lt) n_pipe++; else if (acc) n_mac++; else n_mul++;
    @(posedge clk);
    m_p = tree; m_c = nc; m_a = a; m_b = b; m_acc = acc;
    #1ns;
    check(c_value == m_c, $sformatf("accumulator got=%h exp=%h", c_value, m_c));
    check(c_output == m_c[16*c_field +: 16], "c_output field");
    n_field[c_field]++;
  endtask

  // Shift the whole 256-bit chain once: returns what came out (first bit out
  // in bit 255) and leaves `load` in the chain. scan_en stays high until the
  // next step() lowers it, before the next rising edge.
  task automatic scan_all(input logic [255:0] load, output logic [255:0] unload);
    for (int i = 255; i >= 0; i--) begin
      @(negedge clk);
      scan_en = 1'b1;
      scan_in = load[i];
      unload[i] = scan_out;
      @(posedge clk);
    end
    #1ns;
  endtask

  logic [31:0] ra, rb;
  logic [255:0] got, ld;
  logic [63:0] s_carry, s_sum, s_c;
  logic [31:0] s_a, s_b;

  initial begin
    rst_n = 1'b0; arg_a = '0; arg_b = '0; accumulate = 1'b0; latch_tree = 1'b0;
    scan_en = 1'b0; scan_in = 1'b0; c_field = '0;
    xor_clk = 1'b0; xor_a = 1'b0; xor_ab = 1'b1; xor_b = 1'b0; xor_bb = 1'b1;
    m_a = '0; m_b = '0; m_c = '0; m_p = '0; m_acc = 1'b0;
    #22ns rst_n = 1'b1;
    check(c_value == 64'h0, "reset clears accumulator");

    // Latency: one product, then zero operands with no accumulation.
    step(32'd7, -32'sd3, 1'b0, 1'b0);   // latched into A/B
    check(c_value == 64'h0, "no result one edge after the operands");
    step(32'd0, 32'd0, 1'b0, 1'b0);      // product reaches C on the 2nd edge
    check(c_value == 64'(-21), "7 * -3 after two edges");

    // Extreme operands, one-cycle mode, accumulating.
    step(32'h8000_0000, 32'h8000_0000, 1'b1, 1'b0);
    step(32'h7FFF_FFFF, 32'h8000_0000, 1'b1, 1'b0);
    step(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1, 1'b0);
    // Random mix of multiply-accumulates, plain multiplies and pipelined
    // cycles, switching modes in runs.
    for (int i = 0; i < 3000; i++) begin
      ra = $urandom; rb = $urandom;
      step(ra, rb, 1'($urandom_range(0, 3) != 0), 1'((i / 37) % 2));
    end

    // Scan out everything and compare with the model. The accumulate
    // control latched last (held during the scan) is set to 1 here.
    step($urandom, $urandom, 1'b1, 1'b0);
    ld = '0;
    scan_all(ld, got);
    {s_sum, s_carry, s_b, s_a, s_c} = got;
    check(s_c == m_c, "scanned CRegister");
    check(s_a == m_a, "scanned ARegister");
    check(s_b == m_b, "scanned BRegister");
    check(s_sum + s_carry == m_p, "scanned tree sum + carry");
    n_scan_out++;

    // Scan in chosen values; the pipelined adder adds CarryReg + SumReg.
    s_c = {$urandom, $urandom}; s_a = $urandom; s_b = $urandom;
    s_carry = {$urandom, $urandom}; s_sum = {$urandom, $urandom};
    ld = {s_sum, s_carry, s_b, s_a, s_c};
    scan_all(ld, got);
    check(c_value == s_c, "CRegister after scan-in");
    m_a = s_a; m_b = s_b; m_c = s_c; m_p = s_sum + s_carry;
    n_scan_in++;
    step(32'd0, 32'd0, 1'b1, 1'b1);
    check(c_value == s_sum + s_carry, "final adder adds scanned inputs");
    step(32'd0, 32'd0, 1'b1, 1'b1);   // tree result of scanned A, B, C
    check(c_value == mac(s_a, s_b, s_c, 1'b1), "tree on scanned operands");
    for (int i = 0; i < 50; i++) step($urandom, $urandom, 1'b1, 1'b0);

    // One running sum in pipelined mode: an accumulating operation every
    // other clock, zero operands with accumulate = 0 in between.
    begin
      logic [63:0] run;
      step(32'd0, 32'd0, 1'b0, 1'b0);   // C <- 0 after the next edge
      step(32'd0, 32'd0, 1'b0, 1'b0);
      run = '0;
      for (int i = 0; i < 20; i++) begin
        ra = $urandom; rb = $urandom;
        run += mac(ra, rb, 64'h0, 1'b0);
        step(ra, rb, 1'b1, 1'b1);
        step(32'd0, 32'd0, 1'b0, 1'b1);
      end
      // C alternates between the running sum and the bubbles' zero product;
      // one more clock brings the last sum in.
      step(32'd0, 32'd0, 1'b0, 1'b1);
      check(c_value == run, "pipelined running sum with alternate-cycle issue");
      n_pipe_sum++;
    end

    // DCVSL XOR cell
    for (int v = 0; v < 4; v++) begin
      xor_clk = 1'b0;
      xor_a = v[1]; xor_ab = ~v[1]; xor_b = v[0]; xor_bb = ~v[0];
      #1ns;
      check(xor_out == 1'b0 && xor_outb == 1'b0, "xor precharge");
      xor_clk = 1'b1;
      #1ns;
      check(xor_out == (v[1] ^ v[0]) && xor_outb == ~(v[1] ^ v[0]), "xor evaluate");
      n_xor++;
    end
    xor_clk = 1'b0;

    $display("mechanisms: mac=%0d mul=%0d pipelined=%0d mode_switches=%0d scan_out=%0d scan_in=%0d fields=%0d/%0d/%0d/%0d xor=%0d pipelined_running_sum=%0d",
             n_mac, n_mul, n_pipe, n_switch, n_scan_out, n_scan_in,
             n_field[0], n_field[1], n_field[2], n_field[3], n_xor, n_pipe_sum);
    check(n_mac > 0, "multiply-accumulate happened");
    check(n_mul > 0, "plain multiply happened");
    check(n_pipe > 0, "pipelined mode happened");
    check(n_switch > 0, "mode switch happened");
    check(n_scan_out > 0 && n_scan_in > 0, "scan happened");
    check(n_field[0] > 0 && n_field[1] > 0 && n_field[2] > 0 && n_field[3] > 0,
          "every c_output field read");
    check(n_xor > 0, "xor cell evaluated");
    check(n_pipe_sum > 0, "pipelined running sum happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
