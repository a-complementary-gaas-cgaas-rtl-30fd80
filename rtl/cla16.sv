// cla16: 16-bit adder built from four 4-bit carry-lookahead groups.
//
// Inside each group the carries are looked ahead (see cla4); the group
// carry-outs pass from one group to the next. sum + 2^16*cout = a + b + cin.
// The 16-bit width and the 4-bit lookahead are as specified; linking the
// groups by their carry-outs rather than by a second lookahead level is this
// design's choice. Purely combinational.
module cla16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        cout
);
  logic [4:0] gc;   // carry into group k

  assign gc[0] = cin;
  for (genvar k = 0; k < 4; k++) begin : g_grp
    cla4 u_cla4 (
      .a    (a[4*k +: 4]),
      .b    (b[4*k +: 4]),
      .cin  (gc[k]),
      .sum  (sum[4*k +: 4]),
      .cout (gc[k+1])
    );
  end
  assign cout = gc[4];
endmodule
