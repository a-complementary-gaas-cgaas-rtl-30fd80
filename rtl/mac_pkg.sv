// mac_pkg: sizes and types shared by the multiply-accumulate unit.
//
// The unit multiplies two 32-bit two's complement operands and adds the
// 64-bit product to a 64-bit accumulator. The multiplier operand is recoded
// in radix 4 (modified Booth), giving one digit per pair of bits, so a
// 32-bit operand yields 16 partial products. The final 64-bit adder is cut
// into 16-bit segments. All of these sizes are the ones the design is
// specified with; the struct that carries a Booth digit is this design's
// own encoding.
package mac_pkg;

  localparam int unsigned ARG_W   = 32;         // operand width
  localparam int unsigned ACC_W   = 64;         // product / accumulator width
  localparam int unsigned SEG_W   = 16;         // final adder segment width
  localparam int unsigned FIELD_W = 16;         // COutput field width

  // One radix-4 Booth digit in sign/magnitude form:
  //   neg  - the digit is negative
  //   one  - magnitude 1 (select A)
  //   two  - magnitude 2 (select 2A)
  // one == two == 0 encodes the digit 0.
  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } booth_digit_t;

  // Recode the bit triple {b[2i+1], b[2i], b[2i-1]} into a Booth digit.
  function automatic booth_digit_t booth_recode(input logic [2:0] t);
    booth_digit_t d;
    d.one = t[1] ^ t[0];
    d.two = (t[2] & ~t[1] & ~t[0]) | (~t[2] & t[1] & t[0]);
    // -0 (t == 3'b111) is treated as +0 so that no +1 is injected.
    d.neg = t[2] & ~(t[1] & t[0]);
    return d;
  endfunction

endpackage
