// tb_mod2n1_full: the top at its default sizes (n = 8, RG(32, 2^8+1),
// MOMA(8, 2^8+1)) with no parameter overrides. The two-operand adder is run
// over all 65536 operand pairs, the residue generator and the multi-operand
// adder over random inputs plus corner cases (all zeros, all ones, every
// operand equal to 2^n). Results are compared with integer references.
module tb_mod2n1_full;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  add_a, add_b;
  logic [8:0]  add_r;
  logic [31:0] rg_a;
  logic [8:0]  rg_r;
  logic [8:0]  ops [8];
  logic [8:0]  moma_r;

  mod2n1_top dut (
    .add_a(add_a), .add_b(add_b), .add_r(add_r),
    .rg_a(rg_a), .rg_r(rg_r),
    .moma_ops(ops), .moma_r(moma_r)
  );

  task automatic chk(string name, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s mismatch got=%0d exp=%0d", name, got, exp);
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    rg_a = '0;
    foreach (ops[i]) ops[i] = '0;
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        add_a = 8'(a); add_b = 8'(b); #1;
        chk("add", add_r, (a + b) % 257);
      end
    rg_a = '0; #1; chk("rg 0", rg_r, 0);
    rg_a = '1; #1; chk("rg ones", rg_r, longint'(32'hffff_ffff) % 257);
    for (int t = 0; t < 20000; t++) begin
      rg_a = $urandom; #1;
      chk("rg", rg_r, longint'(rg_a) % 257);
    end
    foreach (ops[i]) ops[i] = 9'd256; #1; chk("moma all 2^n", moma_r, (8 * 256) % 257);
    foreach (ops[i]) ops[i] = 9'd255; #1; chk("moma all 255", moma_r, (8 * 255) % 257);
    for (int t = 0; t < 20000; t++) begin
      s = 0;
      foreach (ops[i]) begin
        ops[i] = ($urandom_range(4) == 0) ? 9'd256 : 9'($urandom_range(255));
        s += ops[i];
      end
      #1; chk("moma", moma_r, s % 257);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
