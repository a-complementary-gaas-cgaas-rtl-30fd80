// mac_top: 32-bit x 32-bit two's complement multiply, 64-bit accumulate unit.
//
// Datapath (one clock cycle in the default mode):
//   ARegister, BRegister  latch the operands arg_a, arg_b (and a flip-flop
//                         latches the accumulate control with them).
//   multiplier_tree       forms the 16 radix-4 Booth partial products of
//                         A*B, adds the accumulator C (when accumulate = 1)
//                         in the same 4:2 compressor tree and leaves a
//                         64-bit sum/carry pair (TreeSum, TreeCarry).
//   CarryRegister,        latch TreeCarry and TreeSum every cycle.
//   SumRegister
//   tree_bypass (x2)      latch_tree = 0: the adder takes the tree outputs
//                         directly (one-cycle MAC). latch_tree = 1: it takes
//                         the Carry/SumRegister copies (two-stage pipeline).
//   final_adder           64-bit carry-select adder; its result (AdderC) is
//                         loaded into CRegister, the accumulator.
//   c_output_select       drives one 16-bit field of C, picked by c_field,
//                         onto c_output.
//
// Timing. One-cycle mode: operands present before clock edge n are latched
// at edge n and C holds A*B (+ old C) after edge n+1; a new operation can
// start every cycle. Pipelined mode: the tree result is latched at edge n+1
// and reaches C at edge n+2. The accumulator feeding the tree is then the one
// from two operations earlier, so back-to-back accumulates in pipelined mode
// form two interleaved sums (even and odd operations).
//
// Scan. With scan_en = 1 every register shifts instead of loading, forming
// one 256-bit chain: scan_in -> CRegister -> ARegister -> BRegister ->
// CarryRegister -> SumRegister -> scan_out, each register entering at bit 0
// and leaving from its top bit. Because CarryRegister and SumRegister are in
// the chain, the tree's intermediate result can be scanned out, and values
// scanned into them reach the final adder when latch_tree = 1.
//
// The side ports xor_* bring out the behavioural model of the dynamic DCVSL
// XOR cell in which the datapath's critical gates are meant to be built; it
// is independent of the rest of the unit (its two dynamic nodes are the only
// latches in the design).
//
// As specified: the operand and accumulator widths, the register set and
// their names, the scan chain order, the bypass under LatchTree, the
// carry-select final adder, the four-field readout. This design's own
// choices: flip-flops for the latches, the asynchronous active-low reset,
// scan_en, the accumulate control (so that plain multiplies are possible
// without first clearing C) and its one-bit register beside ARegister and
// BRegister, and the extra c_value port that shows all of C.
module mac_top
  import mac_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [ARG_W-1:0]   arg_a,
  input  logic [ARG_W-1:0]   arg_b,
  input  logic               accumulate,
  input  logic               latch_tree,
  input  logic               scan_en,
  input  logic               scan_in,
  output logic               scan_out,
  input  logic [1:0]         c_field,
  output logic [FIELD_W-1:0] c_output,
  output logic [ACC_W-1:0]   c_value,
  input  logic               xor_clk,
  input  logic               xor_a,
  input  logic               xor_ab,
  input  logic               xor_b,
  input  logic               xor_bb,
  output logic               xor_out,
  output logic               xor_outb
);
  logic [ARG_W-1:0] a_q, b_q;
  logic [ACC_W-1:0] c_q, c_tree;
  logic [ACC_W-1:0] tree_sum, tree_carry;
  logic [ACC_W-1:0] sum_q, carry_q;
  logic [ACC_W-1:0] sum_adder, carry_adder, adder_c;
  logic             so_c, so_a, so_b, so_carry;
  logic             acc_q;

  // Scan chain: scan_in -> C -> A -> B -> Carry -> Sum -> scan_out
  scan_register #(.W(ACC_W)) u_c_reg (
    .clk, .rst_n, .scan_en, .scan_in (scan_in),
    .d (adder_c), .q (c_q), .scan_out (so_c)
  );
  scan_register #(.W(ARG_W)) u_a_reg (
    .clk, .rst_n, .scan_en, .scan_in (so_c),
    .d (arg_a), .q (a_q), .scan_out (so_a)
  );
  scan_register #(.W(ARG_W)) u_b_reg (
    .clk, .rst_n, .scan_en, .scan_in (so_a),
    .d (arg_b), .q (b_q), .scan_out (so_b)
  );
  scan_register #(.W(ACC_W)) u_carry_reg (
    .clk, .rst_n, .scan_en, .scan_in (so_b),
    .d (tree_carry), .q (carry_q), .scan_out (so_carry)
  );
  scan_register #(.W(ACC_W)) u_sum_reg (
    .clk, .rst_n, .scan_en, .scan_in (so_carry),
    .d (tree_sum), .q (sum_q), .scan_out (scan_out)
  );

  // The accumulate control is latched together with the operands, so it
  // applies to the operation whose operands arrive in the same clock.
  // It is held while scanning and is not part of the scan chain.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        acc_q <= 1'b0;
    else if (!scan_en) acc_q <= accumulate;
  end

  assign c_tree = acc_q ? c_q : '0;

  multiplier_tree u_mult (
    .a (a_q), .b (b_q), .c (c_tree),
    .tree_sum, .tree_carry
  );

  tree_bypass #(.W(ACC_W)) u_carry_bypass (
    .latch_tree, .tree_val (tree_carry), .reg_val (carry_q), .adder_val (carry_adder)
  );
  tree_bypass #(.W(ACC_W)) u_sum_bypass (
    .latch_tree, .tree_val (tree_sum), .reg_val (sum_q), .adder_val (sum_adder)
  );

  final_adder u_final (
    .carry_vec (carry_adder), .sum_vec (sum_adder), .result (adder_c)
  );

  c_output_select u_cout (
    .c (c_q), .c_field, .c_output
  );

  assign c_value = c_q;

  dcvsl_xor u_xor_cell (
    .CLK (xor_clk), .A (xor_a), .AB (xor_ab), .B (xor_b), .BB (xor_bb),
    .OUT (xor_out), .OUTB (xor_outb)
  );
endmodule
