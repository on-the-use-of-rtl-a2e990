// aug_dim1_adder: augmented diminished-1 adder giving the (n+1)-bit weighted
// modulo 2^n+1 sum.
//
// Its operands a*, b* are n-bit vectors whose sum has already been decreased
// by one: a* + b* = A + B - 1 (mod 2^n+1) for the weighted values A, B that
// are to be added. The result is then
//     r = |a* + b* + 1|_{2^n+1} = |A + B|_{2^n+1},   0 <= r <= 2^n.
// The low n bits come from an ordinary diminished-1 (inverted end-around
// carry) adder: |a* + b*|_{2^n} + not(cout). The top bit is 1 exactly when the
// result is 2^n, which happens only when a* + b* = 2^n - 1, i.e. when a* and
// b* are bitwise complementary; it is the AND of the adder's half-sum bits,
// a log2(n)-deep gate tree that stays off the adder's critical path. In that
// case the low bits come out as zero on their own.
//
// Interface: a, b (N bits) in; r (N+1 bits) out. Combinational. The scheme
// (diminished-1 adder plus AND of half-sums for the top bit) follows the
// published augmented adder.
module aug_dim1_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   r
);

  logic [N-1:0] sum;
  logic [N-1:0] hs;

  dim1_adder #(.N(N)) u_dim1 (
    .a(a),
    .b(b),
    .s(sum),
    .h(hs)
  );

  assign r = {&hs, sum};

endmodule
