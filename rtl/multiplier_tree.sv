// multiplier_tree: Booth-encoded 32x32 two's complement multiplier tree with
// the accumulate value folded in, reduced by 4:2 compressors to a redundant
// 64-bit sum/carry pair.
//
// How it works
//   * b is recoded in radix 4: digit i uses {b[2i+1], b[2i], b[2i-1]} with
//     b[-1] = 0, giving N_PP = ARG_W/2 partial products. Each one (0, +-A or
//     +-2A) is sign-extended to ACC_W bits and shifted left by 2i.
//   * The +1 that completes each negative partial product is collected in one
//     extra row (bit 2i set when digit i is negative).
//   * The accumulate value c occupies one more row, so it is already part of
//     the result when the tree's outputs appear: no separate accumulate adder.
//   * The rows go into a full tree of LEVELS levels of 4:2 compressors, each
//     level halving the number of rows (32 -> 16 -> 8 -> 4 -> 2). Row slots
//     that the multiplier does not use are tied to zero; the accumulate row
//     sits in one of them.
//   tree_sum + tree_carry = a*b + c (mod 2^ACC_W).
// As specified: radix-4 Booth encoding, a 4:2 compressor tree of four levels
// (five without Booth), the accumulate value entering the tree through
// compressor inputs the multiplier leaves unused, and 64-bit sum and carry
// outputs. This design's own choices: full sign extension of every partial
// product, a separate row for the negation bits, and which slot holds c.
// Carries out of bit ACC_W-1 (lat[ACC_W], cy[ACC_W-1]) are dropped, since the
// result is taken modulo 2^ACC_W; they are the only unused signals.
// Purely combinational; the surrounding registers give it its clock.
module multiplier_tree
  import mac_pkg::*;
#(
  parameter int unsigned ARG_W_P = ARG_W,
  parameter int unsigned ACC_W_P = ACC_W,
  parameter int unsigned LEVELS  = 4
) (
  input  logic [ARG_W_P-1:0] a,
  input  logic [ARG_W_P-1:0] b,
  input  logic [ACC_W_P-1:0] c,
  output logic [ACC_W_P-1:0] tree_sum,
  output logic [ACC_W_P-1:0] tree_carry
);
  localparam int unsigned NPP   = ARG_W_P / 2;
  localparam int unsigned ROWS  = 2 ** (LEVELS + 1);   // inputs of level 0
  localparam int unsigned NEG_R = NPP;                 // row of negation bits
  localparam int unsigned ACC_R = NPP + 1;             // row of the accumulator

  // Row k of level l is t[OFF(l) + k]; level l has ROWS >> l rows.
  function automatic int unsigned off(input int unsigned l);
    return 2 * ROWS - ((2 * ROWS) >> l);
  endfunction

  wire [ACC_W_P-1:0] t [2*ROWS-2];

  logic [ACC_W_P-1:0] rows [ROWS];
  logic [ARG_W_P:0]   b_ext;
  logic [ARG_W_P:0]   pp  [NPP];
  logic [NPP-1:0]     neg;

  assign b_ext = {b, 1'b0};

  // Partial product generation.
  for (genvar i = 0; i < NPP; i++) begin : g_pp
    booth_encoder #(.W(ARG_W_P)) u_enc (
      .bits (b_ext[2*i +: 3]),
      .a    (a),
      .pp   (pp[i]),
      .neg  (neg[i])
    );
  end

  always_comb begin
    for (int unsigned k = 0; k < ROWS; k++) rows[k] = '0;
    for (int unsigned i = 0; i < NPP; i++) begin
      rows[i] = ACC_W_P'({{(ACC_W_P-ARG_W_P-1){pp[i][ARG_W_P]}}, pp[i]} << (2 * i));
      rows[NEG_R][2*i] = neg[i];
    end
    rows[ACC_R] = c;
  end

  for (genvar k = 0; k < ROWS; k++) begin : g_in
    assign t[k] = rows[k];
  end

  // Compressor levels.
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned NGRP = (ROWS >> l) / 4;
    for (genvar g = 0; g < NGRP; g++) begin : g_grp
      localparam int unsigned IN0  = off(l) + 4 * g;
      localparam int unsigned OUTS = off(l + 1) + 2 * g;
      logic [ACC_W_P:0]   lat;   // lateral carries, lat[j] enters bit j
      logic [ACC_W_P-1:0] cy;    // carry outputs, weight 2^(j+1)
      assign lat[0] = 1'b0;
      for (genvar j = 0; j < ACC_W_P; j++) begin : g_bit
        compressor_4_2 u_c42 (
          .x     ({t[IN0+3][j], t[IN0+2][j], t[IN0+1][j], t[IN0][j]}),
          .cin   (lat[j]),
          .sum   (t[OUTS][j]),
          .carry (cy[j]),
          .cout  (lat[j+1])
        );
      end
      assign t[OUTS+1] = {cy[ACC_W_P-2:0], 1'b0};
    end
  end

  assign tree_sum   = t[off(LEVELS)];
  assign tree_carry = t[off(LEVELS) + 1];

  initial begin
    assert (NPP + 2 <= ROWS) else $fatal(1, "tree has too few row slots");
  end
endmodule
