// tb_mod2n1_top: end-to-end self-checking test of the three components in
// the top at two small sizes, so that every mechanism can be reached:
//   top_a: n = 3, RG(9, 2^3+1), MOMA(4, 2^3+1)  -- RG without correction operand
//   top_b: n = 2, RG(8, 2^2+1), MOMA(6, 2^2+1)  -- RG with correction operand,
//                                                 MOMA correction bypass reachable
// The worked values (143 -> 8 mod 9; 7+4+5+0 -> 7 and 8+4+6+3 -> 3 mod 9;
// 1+1+3+1+0+1 -> 2 mod 5) are applied first, then exhaustive adder and RG
// inputs and random MOMA operands. Counted mechanisms, each required at least
// once: weighted adder result needing the -(2^n+1) correction; results equal
// to 2^n (top bit from the complementary-operand detector) in each of the
// three components; MOMA operands equal to 2^n; MOMA correction stage
// bypassed (e = 2^n) and used.
module tb_mod2n1_top;
  int checks = 0, failures = 0;
  int n_add_wrap = 0, n_add_top = 0, n_rg_top = 0, n_moma_top = 0;
  int n_moma_opmax = 0, n_bypass = 0, n_corr_used = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [2:0] a_add_a, a_add_b; logic [3:0] a_add_r;
  logic [8:0] a_rg_a;           logic [3:0] a_rg_r;
  logic [3:0] a_ops [4];        logic [3:0] a_moma_r;

  logic [1:0] b_add_a, b_add_b; logic [2:0] b_add_r;
  logic [7:0] b_rg_a;           logic [2:0] b_rg_r;
  logic [2:0] b_ops [6];        logic [2:0] b_moma_r;

  mod2n1_top #(.N(3), .RG_K(9), .MOMA_K(4)) top_a (
    .add_a(a_add_a), .add_b(a_add_b), .add_r(a_add_r),
    .rg_a(a_rg_a), .rg_r(a_rg_r),
    .moma_ops(a_ops), .moma_r(a_moma_r)
  );

  mod2n1_top #(.N(2), .RG_K(8), .MOMA_K(6)) top_b (
    .add_a(b_add_a), .add_b(b_add_b), .add_r(b_add_r),
    .rg_a(b_rg_a), .rg_r(b_rg_r),
    .moma_ops(b_ops), .moma_r(b_moma_r)
  );

  task automatic chk(string name, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s mismatch got=%0d exp=%0d", name, got, exp);
    end
  endtask

  function automatic int rnd_res(int n);
    if ($urandom_range(3) == 0) return 1 << n;
    return int'($urandom_range((1 << n) - 1));
  endfunction

  function automatic bit corr_is_max(int k, int ones, int n);
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
    foreach (a_ops[i]) a_ops[i] = '0;
    foreach (b_ops[i]) b_ops[i] = '0;
    a_add_a = 0; a_add_b = 0; b_add_a = 0; b_add_b = 0; a_rg_a = 0; b_rg_a = 0;

    // worked values
    a_rg_a = 9'd143; #1; chk("RG 143 mod 9", a_rg_r, 8);
    a_ops[0] = 7; a_ops[1] = 4; a_ops[2] = 5; a_ops[3] = 0; #1; chk("MOMA 7,4,5,0", a_moma_r, 7);
    a_ops[0] = 8; a_ops[1] = 4; a_ops[2] = 6; a_ops[3] = 3; #1; chk("MOMA 8,4,6,3", a_moma_r, 3);
    b_ops[0] = 1; b_ops[1] = 1; b_ops[2] = 3; b_ops[3] = 1; b_ops[4] = 0; b_ops[5] = 1; #1;
    chk("MOMA 1,1,3,1,0,1", b_moma_r, 2);

    // two-operand adders, exhaustive
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        a_add_a = 3'(a); a_add_b = 3'(b); #1;
        chk("add n3", a_add_r, (a + b) % 9);
        if (a + b > 9) n_add_wrap++;
        if (a_add_r == 8) n_add_top++;
      end
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        b_add_a = 2'(a); b_add_b = 2'(b); #1;
        chk("add n2", b_add_r, (a + b) % 5);
      end

    // residue generators, exhaustive
    for (int v = 0; v < 512; v++) begin
      a_rg_a = 9'(v); #1; chk("RG(9,3)", a_rg_r, v % 9);
      if (a_rg_r == 8) n_rg_top++;
    end
    for (int v = 0; v < 256; v++) begin
      b_rg_a = 8'(v); #1; chk("RG(8,2)", b_rg_r, v % 5);
    end

    // multi-operand adders, random residues
    for (int t = 0; t < 4000; t++) begin
      s = 0; ones = 0;
      foreach (a_ops[i]) begin a_ops[i] = 4'(rnd_res(3)); s += a_ops[i]; ones += a_ops[i][3]; end
      #1; chk("MOMA(4,9)", a_moma_r, s % 9);
      n_moma_opmax += ones;
      if (a_moma_r == 8) n_moma_top++;
      if (corr_is_max(4, ones, 3)) n_bypass++; else n_corr_used++;

      s = 0; ones = 0;
      foreach (b_ops[i]) begin b_ops[i] = 3'(rnd_res(2)); s += b_ops[i]; ones += b_ops[i][2]; end
      #1; chk("MOMA(6,5)", b_moma_r, s % 5);
      n_moma_opmax += ones;
      if (b_moma_r == 4) n_moma_top++;
      if (corr_is_max(6, ones, 2)) n_bypass++; else n_corr_used++;
    end

    $display("adder wrap=%0d adder 2^n=%0d rg 2^n=%0d moma 2^n=%0d moma ops at 2^n=%0d bypass=%0d corr used=%0d",
             n_add_wrap, n_add_top, n_rg_top, n_moma_top, n_moma_opmax, n_bypass, n_corr_used);
    checks++; if (n_add_wrap == 0)   failures++;
    checks++; if (n_add_top == 0)    failures++;
    checks++; if (n_rg_top == 0)     failures++;
    checks++; if (n_moma_top == 0)   failures++;
    checks++; if (n_moma_opmax == 0) failures++;
    checks++; if (n_bypass == 0)     failures++;
    checks++; if (n_corr_used == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
