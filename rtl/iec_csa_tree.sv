// iec_csa_tree: inverted-EAC carry-save tree reducing M operands to two.
//
// The tree is built level by level in Wallace fashion: at every level each
// complete group of three operands goes through an iec_csa stage and leaves
// as two, while the one or two operands left over pass straight on. It stops
// when two operands remain. The tree always holds exactly M-2 stages, and
// each stage adds 1 modulo 2^n+1, so
//     x + y = sum(ops) + (M - 2)   (mod 2^n+1).
// With M = 2 the tree is empty and x, y are the two inputs.
//
// Interface: ops[M] of N bits in, x and y out. Combinational; depth is
// tree_levels(M) full-adder delays. That a tree of inverted-EAC stages
// reduces the summands follows the modulo 2^n+1 residue-generator and
// multi-operand-adder designs; the Wallace grouping is this design's choice.
module iec_csa_tree
  import mod2n1_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned M = 9
) (
  input  logic [N-1:0] ops [M],
  output logic [N-1:0] x,
  output logic [N-1:0] y
);

  localparam int unsigned LEVELS = tree_levels(M);

  if (LEVELS == 0) begin : g_none
    assign x = ops[0];
    assign y = ops[1];
  end else begin : g_tree
    for (genvar l = 0; l < LEVELS; l++) begin : g_level
      localparam int unsigned CNT  = tree_count(M, l);
      localparam int unsigned GRP  = CNT / 3;
      localparam int unsigned REM  = CNT % 3;
      localparam int unsigned NEXT = 2 * GRP + REM;
      logic [N-1:0] cur [CNT];
      logic [N-1:0] nxt [NEXT];
      if (l == 0) begin : g_first
        assign cur = ops;
      end else begin : g_chain
        assign cur = g_level[l-1].nxt;
      end
      for (genvar g = 0; g < GRP; g++) begin : g_csa
        iec_csa #(.N(N)) u_csa (
          .x(cur[3*g]),
          .y(cur[3*g+1]),
          .z(cur[3*g+2]),
          .s(nxt[2*g]),
          .c(nxt[2*g+1])
        );
      end
      for (genvar r = 0; r < REM; r++) begin : g_pass
        assign nxt[2*GRP+r] = cur[3*GRP+r];
      end
    end
    assign x = g_level[LEVELS-1].nxt[0];
    assign y = g_level[LEVELS-1].nxt[1];
  end

  initial begin
    assert (M >= 2) else $error("iec_csa_tree needs at least two operands");
  end

endmodule
