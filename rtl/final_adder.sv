// final_adder: 64-bit carry-select adder that turns the multiplier tree's
// redundant sum/carry pair into the binary result (the next accumulator).
//
// The operands are cut into N_SEG segments of SEG_W bits. The lowest
// segment has one 16-bit adder with carry-in 0. Every higher segment has two
// 16-bit adders working in parallel, one assuming carry-in 0 and one assuming
// carry-in 1; a multiplexer keeps the one whose assumption matches the carry
// that actually leaves the segment below. With the default sizes that is
// 1 + 2*3 = 7 adders. The carry out of the top segment is dropped (the sum
// is taken modulo 2^64, so seg_c[N_SEG] is left unused). Purely
// combinational.
// The segment width, the seven adders and the carry-select multiplexers are
// as specified.
module final_adder
  import mac_pkg::*;
#(
  parameter int unsigned N_SEG = ACC_W / SEG_W
) (
  input  logic [N_SEG*16-1:0] carry_vec,
  input  logic [N_SEG*16-1:0] sum_vec,
  output logic [N_SEG*16-1:0] result
);
  logic [N_SEG:0] seg_c;   // carry into segment k

  assign seg_c[0] = 1'b0;

  cla16 u_seg0 (
    .a    (sum_vec[15:0]),
    .b    (carry_vec[15:0]),
    .cin  (seg_c[0]),
    .sum  (result[15:0]),
    .cout (seg_c[1])
  );

  for (genvar k = 1; k < N_SEG; k++) begin : g_seg
    logic [15:0] s0, s1;
    logic        c0, c1;
    cla16 u_add0 (
      .a (sum_vec[16*k +: 16]), .b (carry_vec[16*k +: 16]), .cin (1'b0),
      .sum (s0), .cout (c0)
    );
    cla16 u_add1 (
      .a (sum_vec[16*k +: 16]), .b (carry_vec[16*k +: 16]), .cin (1'b1),
      .sum (s1), .cout (c1)
    );
    assign result[16*k +: 16] = seg_c[k] ? s1 : s0;
    assign seg_c[k+1]         = seg_c[k] ? c1 : c0;
  end
endmodule
