// scan_register: W-bit register with a serial scan path.
//
// On each rising clock edge the register either loads d (scan_en = 0) or
// shifts by one bit towards its top bit, taking scan_in into bit 0
// (scan_en = 1). scan_out is always the top bit, q[W-1], so registers can be
// chained scan_out -> scan_in into one long shift register; W clocks in scan
// mode move a whole word through one register. An active-low asynchronous
// reset clears it.
// Every register of the unit being in one global scan chain is as specified;
// edge-triggered flip-flops, the shift direction, the scan enable and the
// reset are this design's choices.
module scan_register #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         scan_en,
  input  logic         scan_in,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic         scan_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (scan_en) q <= {q[W-2:0], scan_in};
    else              q <= d;
  end

  assign scan_out = q[W-1];
endmodule
