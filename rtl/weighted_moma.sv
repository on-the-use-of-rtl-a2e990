// weighted_moma: MOMA(k, 2^n+1), weighted multi-operand modulo 2^n+1 adder for
// K operands of n+1 bits, each a residue in [0, 2^n].
//
// The low n bits of the K operands are reduced to two vectors by an inverted
// end-around-carry carry-save tree (K-2 stages, +1 each). A last carry-save
// stage adds the n low bits of the correction factor E from moma_corr (+1
// more), and an augmented diminished-1 adder (+1 more) produces the (n+1)-bit
// result. Operands equal to 2^n have zero low bits and are accounted for in E
// as -1 each, so
//     r = |sum of the operands|_{2^n+1}.
// E is computed off the critical path and enters only at the last stage. When
// E equals 2^n (= -1), the last stage is bypassed instead: a multiplexer
// controlled by the top bit of E feeds the adder directly from the tree, and
// the missing +1 of the skipped stage is exactly the -1 that E stood for.
//
// Interface: ops[K] of N+1 bits in; r (N+1 bits) out. Combinational: tree
// depth plus one carry-save stage and one diminished-1 adder. Operands must
// be valid residues (top bit set only together with zero low bits). The
// structure (ones-counter correction, correction at the last tree stage,
// bypass multiplexer, augmented diminished-1 final adder) is published; the
// Wallace grouping of the tree is this design's choice.
module weighted_moma
  import mod2n1_pkg::*;
#(
  parameter int unsigned K = 8,
  parameter int unsigned N = 8
) (
  input  logic [N:0] ops [K],
  output logic [N:0] r
);

  logic [N-1:0] low [K];
  logic [K-1:0] msb;
  logic [N:0]   e;
  logic [N-1:0] tx, ty;
  logic [N-1:0] cx, cy;
  logic [N-1:0] fx, fy;

  for (genvar i = 0; i < K; i++) begin : g_split
    assign low[i] = ops[i][N-1:0];
    assign msb[i] = ops[i][N];
  end

  moma_corr #(.K(K), .N(N)) u_corr (
    .msb(msb),
    .e(e)
  );

  iec_csa_tree #(.N(N), .M(K)) u_tree (
    .ops(low),
    .x(tx),
    .y(ty)
  );

  iec_csa #(.N(N)) u_last (
    .x(tx),
    .y(ty),
    .z(e[N-1:0]),
    .s(cx),
    .c(cy)
  );

  always_comb begin
    if (e[N]) begin
      fx = tx;
      fy = ty;
    end else begin
      fx = cx;
      fy = cy;
    end
  end

  aug_dim1_adder #(.N(N)) u_add (
    .a(fx),
    .b(fy),
    .r(r)
  );

endmodule
