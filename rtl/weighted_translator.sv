// weighted_translator: turns two n-bit weighted operands A, B into n-bit
// vectors A*, B* with A* + B* = A + B - 1 (mod 2^n+1), the input form an
// augmented diminished-1 adder needs.
//
// It is one inverted end-around-carry carry-save stage whose third operand is
// the constant 2^n - 1 = -2 (mod 2^n+1): such a stage adds its operands plus 1,
// giving A + B - 2 + 1 = A + B - 1. With an all-ones third operand each full
// adder collapses to an XNOR (sum) and an OR (carry), so the translator is one
// gate level deep:
//     A*_i     = not(A_i ^ B_i)
//     B*_{i+1} = A_i | B_i,   B*_0 = not(A_{n-1} | B_{n-1})
//
// Interface: a, b (N bits) in; as_o, bs_o (N bits) out. Combinational.
// A translator with this input/output relation is part of the published
// two-operand scheme, which leaves its circuit open; the constant-operand
// carry-save stage is this design's choice.
module weighted_translator #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] as_o,
  output logic [N-1:0] bs_o
);

  logic [N-1:0] orv;

  always_comb begin
    orv  = a | b;
    as_o = ~(a ^ b);
    bs_o = {orv[N-2:0], ~orv[N-1]};
  end

endmodule
