// residue_generator: RG(k, 2^n+1), the weighted residue |A|_{2^n+1} of a
// k-bit unsigned number A.
//
// Since 2^n = -1 (mod 2^n+1), splitting A into n-bit groups g_0, g_1, ...
// (least significant first, the last group zero-padded) gives
//     |A| = g_0 - g_1 + g_2 - ...   (mod 2^n+1).
// A negated group is replaced by its bitwise complement plus 2
// (-g = not(g) + 2 mod 2^n+1); the padded positions of a complemented group
// are simply constant ones. The groups go into an inverted end-around-carry
// carry-save tree, which adds 1 per stage, and the two vectors it leaves are
// summed by an augmented diminished-1 adder, which adds 1 more. The design
// therefore needs the two tree outputs to carry the sum decreased by one,
// and the constant operand that makes it so is
//     C = |2*(odd groups) - (number of groups)|_{2^n+1}.
// When C would be 2^n (= -1) the operand is left out instead: dropping one
// tree input also drops one stage and its +1. This is the case, for example,
// for RG(9, 2^3+1). If A has no more than n bits it is its own residue.
//
// Interface: a (K bits) in; r (N+1 bits) out, in [0, 2^n]. Combinational;
// depth is the tree depth plus one diminished-1 adder. The method (alternating
// group complementing, inverted-EAC tree, augmented diminished-1 final adder,
// correction reduced by one and dropped when it vanishes) is the published
// one. The Wallace grouping of the tree and placing the constant among the
// first-level operands are this design's choices.
module residue_generator
  import mod2n1_pkg::*;
#(
  parameter int unsigned K = 32,
  parameter int unsigned N = 8
) (
  input  logic [K-1:0] a,
  output logic [N:0]   r
);

  localparam int unsigned G      = num_groups(K, N);
  localparam int unsigned ODD    = G / 2;
  localparam longint unsigned CORR = mod2n1(2 * longint'(ODD) - longint'(G), N);
  localparam bit          USE_C  = (CORR != (longint'(1) << N));
  localparam int unsigned M      = USE_C ? G + 1 : G;

  if (G < 2) begin : g_short
    // A < 2^n: already reduced.
    assign r = (N + 1)'(a);
  end else begin : g_full
    logic [N-1:0] ops [M];
    logic [N-1:0] x;
    logic [N-1:0] y;

    for (genvar j = 0; j < G; j++) begin : g_grp
      for (genvar i = 0; i < N; i++) begin : g_bit
        if (j * N + i < K) begin : g_in
          assign ops[j][i] = (j % 2 == 1) ? ~a[j*N+i] : a[j*N+i];
        end else begin : g_pad
          assign ops[j][i] = (j % 2 == 1);
        end
      end
    end
    if (USE_C) begin : g_corr
      assign ops[G] = N'(CORR);
    end

    iec_csa_tree #(.N(N), .M(M)) u_tree (
      .ops(ops),
      .x(x),
      .y(y)
    );

    aug_dim1_adder #(.N(N)) u_add (
      .a(x),
      .b(y),
      .r(r)
    );
  end

endmodule
