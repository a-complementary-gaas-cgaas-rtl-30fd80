// tree_bypass: chooses what the final adder adds (CarryBypass / SumBypass).
//
// latch_tree = 0: the multiplier tree output goes straight to the final
//   adder, so tree and adder work in the same clock cycle (one-cycle MAC).
// latch_tree = 1: the copy held in the pipeline register (CarryRegister or
//   SumRegister) goes to the adder instead, splitting the MAC into two
//   pipeline stages, and letting a value scanned into that register be added.
// The two bypass multiplexers and the LatchTree control are as specified;
// the polarity of latch_tree is this design's choice. Purely combinational.
module tree_bypass #(
  parameter int unsigned W = 64
) (
  input  logic         latch_tree,
  input  logic [W-1:0] tree_val,
  input  logic [W-1:0] reg_val,
  output logic [W-1:0] adder_val
);
  always_comb adder_val = latch_tree ? reg_val : tree_val;
endmodule
