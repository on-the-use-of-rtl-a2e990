// dim1_adder: n-bit diminished-1 modulo 2^n+1 adder (inverted end-around-carry
// parallel-prefix adder).
//
// It returns s = |a + b|_{2^n} + not(cout), where cout is the carry out of the
// plain n-bit sum a + b: the carry leaving the top is complemented and fed
// back into bit 0. Modulo 2^n+1 this is a + b + 1 whenever a + b != 2^n - 1.
//
// How it works. Bit i gets generate g_i = a_i & b_i and half-sum
// h_i = a_i ^ b_i, which also serves as the propagate signal. Every carry is
// a function of the carry entering some earlier bit; for a span of bits that
// function is c_out = G | P & c_in, or G | P & not(c_in) when the span runs
// across the end-around connection (bit n-1 to bit 0) and so holds its
// inversion. Two spans (upper G1,P1 after lower G2,P2) compose as
//     upper span free of the inversion  : (G1 | P1&G2,       P1&P2)
//     inversion in or before upper span : (G1 | P1&~G2&~P2,  P1&~G2)
// (the second form because not(G2 | P2&x) = ~G2&~P2 | ~G2&~x).
// For n a power of two this runs as a cyclic Kogge-Stone tree: log2(n)
// levels of n nodes, node i combining with node (i - 2^l) mod n, so every node
// ends with the span of all n bits that closes on its own carry. That gives
//     c_0 = not G (span without the end-around link, fed back inverted)
//     c_i = G | P (i > 0; P = 1 with G = 0 means all bits propagate, and the
//                  diminished-1 rule then sets every carry)
// and s_i = h_i ^ c_i. For other n a Kogge-Stone prefix tree (spans [i:0])
// and suffix tree (spans [n-1:i]) are combined instead,
//     c_0 = not G[n-1:0],  c_i = G[i-1:0] | P[i-1:0] & not G[n-1:i],
// which costs one extra gate level.
// The half-sum vector h is also an output, so that an augmented adder can
// reuse it.
//
// Interface: a, b (N bits) in; s, h (N bits) out. Combinational; log2(N)
// prefix levels (one more for N not a power of two). The function (an inverted
// end-around-carry adder in log2(n) prefix levels) is what the modulo 2^n+1
// designs call for; the span algebra above is this design's own formulation
// of the carry network.
module dim1_adder #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic [N-1:0] h
);

  localparam int unsigned LV = (N > 1) ? $clog2(N) : 1;
  localparam bit          POW2 = ((1 << LV) == N);

  logic [N-1:0] c;

  assign h = a ^ b;
  assign s = h ^ c;

  if (POW2) begin : g_cyclic
    // gc/pc[l][i]: span of 2^l bits ending at bit i (cyclically). Whether a
    // span holds the end-around inversion depends only on (l, i), so it is
    // decided at elaboration and never becomes a signal.
    logic [N-1:0] gc [LV+1];
    logic [N-1:0] pc [LV+1];

    always_comb begin
      gc[0] = a & b;
      pc[0] = a ^ b;
      for (int unsigned l = 0; l < LV; l++) begin
        for (int unsigned i = 0; i < N; i++) begin
          // lower span ends at (i - 2^l) mod N; the upper one starts at bit 0
          // (inversion between them) or wraps round itself when i + 1 < 2^l
          if (i + 1 <= (1 << l)) begin
            gc[l+1][i] = gc[l][i] | (pc[l][i] & ~gc[l][(i+N-(1<<l))%N] & ~pc[l][(i+N-(1<<l))%N]);
            pc[l+1][i] = pc[l][i] & ~gc[l][(i+N-(1<<l))%N];
          end else begin
            gc[l+1][i] = gc[l][i] | (pc[l][i] & gc[l][i-(1<<l)]);
            pc[l+1][i] = pc[l][i] & pc[l][i-(1<<l)];
          end
        end
      end
      c[0] = ~gc[LV][N-1];
      for (int unsigned i = 1; i < N; i++)
        c[i] = gc[LV][i-1] | pc[LV][i-1];
    end
  end else begin : g_prefix_suffix
    // gp/pp[l][i]: span [i : max(0, i-2^l+1)]; gs/ps[l][i]: span [min(N-1, i+2^l-1) : i].
    logic [N-1:0] gp [LV+1];
    logic [N-1:0] pp [LV+1];
    logic [N-1:0] gs [LV+1];
    logic [N-1:0] ps [LV+1];

    always_comb begin
      gp[0] = a & b;
      pp[0] = a ^ b;
      gs[0] = a & b;
      ps[0] = a ^ b;
      for (int unsigned l = 0; l < LV; l++) begin
        for (int unsigned i = 0; i < N; i++) begin
          if (i >= (1 << l)) begin
            gp[l+1][i] = gp[l][i] | (pp[l][i] & gp[l][i-(1<<l)]);
            pp[l+1][i] = pp[l][i] & pp[l][i-(1<<l)];
          end else begin
            gp[l+1][i] = gp[l][i];
            pp[l+1][i] = pp[l][i];
          end
          if (i + (1 << l) < N) begin
            gs[l+1][i] = gs[l][i+(1<<l)] | (ps[l][i+(1<<l)] & gs[l][i]);
            ps[l+1][i] = ps[l][i+(1<<l)] & ps[l][i];
          end else begin
            gs[l+1][i] = gs[l][i];
            ps[l+1][i] = ps[l][i];
          end
        end
      end
      c[0] = ~gp[LV][N-1];
      for (int unsigned i = 1; i < N; i++)
        c[i] = gp[LV][i-1] | (pp[LV][i-1] & ~gs[LV][i]);
    end
  end

endmodule
