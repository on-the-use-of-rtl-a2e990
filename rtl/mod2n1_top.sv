// mod2n1_top: the three weighted modulo 2^n+1 components built around the
// augmented diminished-1 adder, side by side.
//
//   * add_*  : two-operand weighted adder, n-bit operands, (n+1)-bit result.
//   * rg_*   : residue generator RG(RG_K, 2^n+1), RG_K-bit input.
//   * moma_* : multi-operand adder MOMA(MOMA_K, 2^n+1), (n+1)-bit operands.
//
// The three are independent datapaths sharing the modulus 2^N+1; each has its
// own ports and nothing is registered. Every result is a weighted residue in
// [0, 2^N], N+1 bits wide. The default sizes (n = 8, a 32-bit residue
// generator, an 8-operand adder) are one of the configurations the three
// components were evaluated at; that they share one N is this design's choice.
module mod2n1_top #(
  parameter int unsigned N      = 8,
  parameter int unsigned RG_K   = 32,
  parameter int unsigned MOMA_K = 8
) (
  input  logic [N-1:0]    add_a,
  input  logic [N-1:0]    add_b,
  output logic [N:0]      add_r,
  input  logic [RG_K-1:0] rg_a,
  output logic [N:0]      rg_r,
  input  logic [N:0]      moma_ops [MOMA_K],
  output logic [N:0]      moma_r
);

  weighted_mod_adder #(.N(N)) u_add (
    .a(add_a),
    .b(add_b),
    .r(add_r)
  );

  residue_generator #(.K(RG_K), .N(N)) u_rg (
    .a(rg_a),
    .r(rg_r)
  );

  weighted_moma #(.K(MOMA_K), .N(N)) u_moma (
    .ops(moma_ops),
    .r(moma_r)
  );

endmodule
