// iec_csa: one inverted end-around-carry (EAC) carry-save stage, modulo 2^n+1.
//
// Three n-bit operands x, y, z are added bit by bit in full adders. The sum
// vector s is the bitwise XOR; the carry vector c is the majority vector moved
// one place to the left, and the carry that leaves the top bit (weight 2^n) is
// complemented and put in the least significant position. Because
// c_n*2^n = -c_n = (not c_n) - 1 modulo 2^n+1, the outputs satisfy
//     s + c = x + y + z + 1   (mod 2^n+1),
// i.e. every stage adds exactly 1 to the sum it reduces. The components that
// use these stages account for that constant in their correction factor.
//
// Interface: x, y, z in; s, c out, all N bits wide. Purely combinational,
// one full-adder delay. The cell and the inverted end-around carry are as
// the modulo 2^n+1 literature describes them; nothing here is a local choice.
module iec_csa #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] z,
  output logic [N-1:0] s,
  output logic [N-1:0] c
);

  logic [N-1:0] maj;

  always_comb begin
    s   = x ^ y ^ z;
    maj = (x & y) | (x & z) | (y & z);
    c   = {maj[N-2:0], ~maj[N-1]};
  end

endmodule
