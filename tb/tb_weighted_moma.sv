// tb_weighted_moma: self-checking test of MOMA(k, 2^n+1) for (n+1)-bit
// weighted operands. Directed cases are the worked sums 7+4+5+0 = 7 and
// 8+4+6+3 = 3 modulo 9, and 1+1+3+1+0+1 = 2 modulo 5. Random operands in
// [0, 2^n] (with 2^n made frequent) are applied to (K, n) = (4, 3), (6, 2),
// (4, 2), (2, 4), (3, 4) and the default (8, 8); results must equal the sum
// modulo 2^n+1. Events counted and required: an operand equal to 2^n, a
// result equal to 2^n, and the correction stage being bypassed (e = 2^n).
module tb_weighted_moma;
  int checks = 0, failures = 0;
  int n_opmax = 0, n_top = 0, n_bypass = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [3:0] o43 [4]; logic [3:0] r43;
  logic [2:0] o62 [6]; logic [2:0] r62;
  logic [2:0] o42 [4]; logic [2:0] r42;
  logic [4:0] o24 [2]; logic [4:0] r24;
  logic [4:0] o34 [3]; logic [4:0] r34;
  logic [8:0] o88 [8]; logic [8:0] r88;

  weighted_moma #(.K(4), .N(3)) d43 (.ops(o43), .r(r43));
  weighted_moma #(.K(6), .N(2)) d62 (.ops(o62), .r(r62));
  weighted_moma #(.K(4), .N(2)) d42 (.ops(o42), .r(r42));
  weighted_moma #(.K(2), .N(4)) d24 (.ops(o24), .r(r24));
  weighted_moma #(.K(3), .N(4)) d34 (.ops(o34), .r(r34));
  weighted_moma                 d88 (.ops(o88), .r(r88));

  task automatic chk(string name, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s mismatch got=%0d exp=%0d", name, got, exp);
    end
  endtask

  // a random residue in [0, 2^n], 2^n with probability about 1/4
  function automatic int rnd_res(int n);
    if ($urandom_range(3) == 0) return 1 << n;
    return int'($urandom_range((1 << n) - 1));
  endfunction

  function automatic bit is_bypass(int k, int ones, int n);
    int m = (1 << n) + 1;
    return (((-(k + ones)) % m + m) % m) == (1 << n);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, ones;
    o43[0] = 7; o43[1] = 4; o43[2] = 5; o43[3] = 0; #1;
    chk("7+4+5+0 mod 9", r43, 7);
    o43[0] = 8; o43[1] = 4; o43[2] = 6; o43[3] = 3; #1;
    chk("8+4+6+3 mod 9", r43, 3);
    o62[0] = 1; o62[1] = 1; o62[2] = 3; o62[3] = 1; o62[4] = 0; o62[5] = 1; #1;
    chk("1+1+3+1+0+1 mod 5", r62, 2);

    for (int t = 0; t < 3000; t++) begin
      s = 0; ones = 0;
      foreach (o43[i]) begin o43[i] = 4'(rnd_res(3)); s += o43[i]; ones += o43[i][3]; end
      #1; chk("K4N3", r43, s % 9);
      n_opmax += ones; if (is_bypass(4, ones, 3)) n_bypass++;

      s = 0; ones = 0;
      foreach (o62[i]) begin o62[i] = 3'(rnd_res(2)); s += o62[i]; ones += o62[i][2]; end
      #1; chk("K6N2", r62, s % 5);
      if (r62 == 4) n_top++;
      if (is_bypass(6, ones, 2)) n_bypass++;

      s = 0; ones = 0;
      foreach (o42[i]) begin o42[i] = 3'(rnd_res(2)); s += o42[i]; ones += o42[i][2]; end
      #1; chk("K4N2", r42, s % 5);
      if (is_bypass(4, ones, 2)) n_bypass++;

      s = 0;
      foreach (o24[i]) begin o24[i] = 5'(rnd_res(4)); s += o24[i]; end
      #1; chk("K2N4", r24, s % 17);

      s = 0;
      foreach (o34[i]) begin o34[i] = 5'(rnd_res(4)); s += o34[i]; end
      #1; chk("K3N4", r34, s % 17);

      s = 0;
      foreach (o88[i]) begin o88[i] = 9'(rnd_res(8)); s += o88[i]; end
      #1; chk("K8N8", r88, s % 257);
      if (r88 == 256) n_top++;
    end
    $display("operands at 2^n=%0d results at 2^n=%0d bypassed corrections=%0d", n_opmax, n_top, n_bypass);
    checks++;
    if (n_opmax == 0 || n_top == 0 || n_bypass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
