// moma_corr: correction-factor generator of the weighted multi-operand
// modulo 2^n+1 adder (a modified ones counter).
//
// An (n+1)-bit weighted residue has its top bit set only when it equals 2^n,
// which is -1 modulo 2^n+1. The adder feeds the low n bits of every operand to
// its carry-save tree and makes up for the top bits, and for the +1 that each
// carry-save stage and the final diminished-1 adder contribute, with
//     E = |-K - ones(msb)|_{2^n+1},
// where ones(msb) is the number of operands equal to 2^n. The unit counts the
// ones and maps each possible count 0..K to its constant E through a small
// decoder. E can equal 2^n for some K and n, so it is n+1 bits wide; its top
// bit tells the adder to skip the correction stage.
//
// Interface: msb (K bits) in; e (N+1 bits) out. Combinational; the count and
// decode are shallower than the carry-save tree they feed. The formula for E
// and the counter-plus-translator structure are published; the counter
// written as a plain sum and the decoder as a case over counts are this
// design's choices.
module moma_corr
  import mod2n1_pkg::*;
#(
  parameter int unsigned K = 8,
  parameter int unsigned N = 8
) (
  input  logic [K-1:0] msb,
  output logic [N:0]   e
);

  localparam int unsigned CW = clog2_min1(K);

  logic [CW-1:0] cnt;

  always_comb begin
    cnt = '0;
    for (int unsigned i = 0; i < K; i++)
      cnt = cnt + CW'(msb[i]);
  end

  always_comb begin
    e = '0;
    for (int unsigned v = 0; v <= K; v++)
      if (cnt == CW'(v))
        e = (N + 1)'(mod2n1(-(longint'(K) + longint'(v)), N));
  end

endmodule
