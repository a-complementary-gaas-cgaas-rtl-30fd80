// dcvsl_xor: behavioural model (not synthesizable logic) of a dynamic
// differential cascode voltage switch logic (DCVSL) XOR/XNOR gate with
// keeper transistors.
//
// The gate takes both rails of each input (A/AB, B/BB) and gives both rails
// of the result (OUT = A xor B, OUTB = its complement). It has two dynamic
// nodes, one per rail, each followed by an inverter.
//   CLK = 0, precharge: both dynamic nodes are pulled high, so OUT and OUTB
//            are both 0.
//   CLK = 1, evaluate:  the n-channel network discharges exactly one dynamic
//            node, T_EVAL_PS after the inputs allow it, and that rail's
//            output rises. A node only ever falls during evaluation (domino
//            behaviour); the keepers hold a node that is not discharged, so
//            the outputs stay valid for as long as CLK stays high, however
//            long that is.
// Inputs must follow the domino rule: they may only rise during evaluation,
// and the evaluate phase must last longer than T_EVAL_PS.
// The structure, the keepers, the pin names and the 428 ps evaluation delay
// are as specified; modelling the delay as one fixed value is this model's
// simplification. A synthesis tool reads the two dynamic nodes as latches;
// that is intended, as they are the gate's charge-storage nodes.
module dcvsl_xor #(
  parameter int unsigned T_EVAL_PS = 428
) (
  input  logic CLK,
  input  logic A,
  input  logic AB,
  input  logic B,
  input  logic BB,
  output logic OUT,
  output logic OUTB
);

  logic node_t;   // dynamic node of the true rail (high = precharged)
  logic node_f;   // dynamic node of the complement rail
  logic pull_t, pull_f;

  // n-channel evaluation networks
  assign pull_t = (A & BB) | (AB & B);
  assign pull_f = (A & B) | (AB & BB);

  always @(CLK or pull_t or pull_f) begin
    if (!CLK) begin
      node_t <= 1'b1;
      node_f <= 1'b1;
    end else begin
      if (pull_t) node_t <= #(T_EVAL_PS * 1ps) 1'b0;
      if (pull_f) node_f <= #(T_EVAL_PS * 1ps) 1'b0;
    end
  end

  assign OUT  = ~node_t;
  assign OUTB = ~node_f;
endmodule
