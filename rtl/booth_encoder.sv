// booth_encoder: radix-4 (modified Booth) encoder and partial-product select
// for one digit of the multiplier.
//
// The triple bits = {b[2i+1], b[2i], b[2i-1]} is recoded into a digit d in
// {-2,-1,0,+1,+2}; the multiplicand A is then selected as 0, A or 2A
// (ARG_W+1 bits, sign-extended) and inverted bit by bit when d is negative.
// The missing +1 of the two's complement negation is returned as `neg` and
// added by the compressor tree at the partial product's lowest bit, so the
// partial product equals d*A = (neg ? ~pp_mag : pp_mag) + neg.
// Using radix-4 Booth recoding is as specified; the sign/magnitude digit
// encoding and the "invert then add neg" negation are this design's choices.
// Purely combinational.
module booth_encoder
  import mac_pkg::*;
#(
  parameter int unsigned W = ARG_W
) (
  input  logic [2:0] bits,
  input  logic [W-1:0] a,
  output logic [W:0]   pp,
  output logic         neg
);
  booth_digit_t d;
  logic [W:0]   a_ext;
  logic [W:0]   mag;

  always_comb begin
    d     = booth_recode(bits);
    assert final (!(d.one && d.two)) else $error("Booth digit selects both A and 2A");
    a_ext = {a[W-1], a};
    unique case ({d.two, d.one})
      2'b01:   mag = a_ext;
      2'b10:   mag = {a, 1'b0};
      default: mag = '0;
    endcase
    pp  = d.neg ? ~mag : mag;
    neg = d.neg;
  end
endmodule
