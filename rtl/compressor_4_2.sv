// compressor_4_2: one bit of a 4:2 compressor.
//
// Adds four bits of equal weight and a carry-in from the next lower bit
// position:  x[0]+x[1]+x[2]+x[3]+cin = sum + 2*(carry + cout).
// It is built from two full adders. The first adds x[0..2] and produces
// cout, which depends only on x, never on cin, so the lateral carries of a
// compressor row cannot ripple more than one position. The second full adder
// adds the first one's sum, x[3] and cin to give sum and carry.
// The compressor's function (four bits in, two out, used to build the
// partial-product tree) is as specified; the two-full-adder construction is
// this design's choice. Purely combinational.
module compressor_4_2 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic s1;

  always_comb begin
    s1    = x[0] ^ x[1] ^ x[2];
    cout  = (x[0] & x[1]) | (x[0] & x[2]) | (x[1] & x[2]);
    sum   = s1 ^ x[3] ^ cin;
    carry = (s1 & x[3]) | (s1 & cin) | (x[3] & cin);
  end
endmodule
