// weighted_mod_adder: two-operand weighted modulo 2^n+1 adder built from a
// translator and an augmented diminished-1 adder.
//
// A and B are n-bit weighted residues in [0, 2^n - 1]. The translator forms
// A*, B* with A* + B* = A + B - 1 (mod 2^n+1); the augmented diminished-1
// adder adds them, puts back the 1 through its inverted end-around carry, and
// raises the (n+1)-th bit when the result is 2^n. The result r is
// |A + B|_{2^n+1} in [0, 2^n], n+1 bits wide.
//
// Interface: a, b (N bits) in; r (N+1 bits) out. Combinational: one gate
// level of translation plus the diminished-1 adder. The arrangement
// (translator feeding an augmented diminished-1 adder) is the published
// one; the translator circuit is this design's choice (see
// weighted_translator).
module weighted_mod_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   r
);

  logic [N-1:0] as_w;
  logic [N-1:0] bs_w;

  weighted_translator #(.N(N)) u_tr (
    .a(a),
    .b(b),
    .as_o(as_w),
    .bs_o(bs_w)
  );

  aug_dim1_adder #(.N(N)) u_add (
    .a(as_w),
    .b(bs_w),
    .r(r)
  );

endmodule
