// c_output_select: reads the 64-bit accumulator out 16 bits at a time.
//
// c_field selects field k = c[16k+15 : 16k] of the accumulator
// (0: bits 0-15, 1: bits 16-31, 2: bits 32-47, 3: bits 48-63) and drives it
// onto c_output. Purely combinational.
// The four 16-bit fields and the CField select are as specified; the binary
// encoding of c_field is this design's choice.
module c_output_select
  import mac_pkg::*;
#(
  parameter int unsigned FW = FIELD_W
) (
  input  logic [4*FW-1:0] c,
  input  logic [1:0]      c_field,
  output logic [FW-1:0]   c_output
);
  always_comb c_output = c[FW*c_field +: FW];
endmodule
