// tb_residue_generator: self-checking test of RG(k, 2^n+1).
// Configurations: (9, 3) exhaustively, including the worked value 143 -> 8;
// (8, 4) exhaustively; (6, 4) with an incomplete complemented group;
// (3, 4) where the input is shorter than a group; the default (32, 8) with
// random and corner inputs. The reference residue is computed bit-serially
// (r = 2r + bit mod 2^n+1) in the testbench. Both forms of the design, with
// and without the constant correction operand, are covered: (9,3) drops it,
// (8,4), (6,4) and (32,8) use it.
module tb_residue_generator;
  int checks = 0, failures = 0;
  int n_top = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [8:0]  a9;  logic [3:0] r9;
  logic [7:0]  a8;  logic [4:0] r8;
  logic [5:0]  a6;  logic [4:0] r6;
  logic [2:0]  a3;  logic [4:0] r3;
  logic [31:0] a32; logic [8:0] r32;

  residue_generator #(.K(9), .N(3)) d9  (.a(a9),  .r(r9));
  residue_generator #(.K(8), .N(4)) d8  (.a(a8),  .r(r8));
  residue_generator #(.K(6), .N(4)) d6  (.a(a6),  .r(r6));
  residue_generator #(.K(3), .N(4)) d3  (.a(a3),  .r(r3));
  residue_generator                 d32 (.a(a32), .r(r32));

  function automatic longint ref_res(logic [63:0] v, int k, int n);
    longint m = (longint'(1) << n) + 1;
    longint r = 0;
    for (int i = k - 1; i >= 0; i--) r = (2 * r + longint'(v[i])) % m;
    return r;
  endfunction

  task automatic chk(string name, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s mismatch got=%0d exp=%0d", name, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a9 = 9'd143; #1;
    chk("RG(9,3) 143", r9, 8);
    for (int v = 0; v < 512; v++) begin
      a9 = 9'(v); #1;
      chk("RG(9,3)", r9, ref_res(64'(v), 9, 3));
      if (r9[3]) n_top++;
    end
    for (int v = 0; v < 256; v++) begin
      a8 = 8'(v); #1;
      chk("RG(8,4)", r8, ref_res(64'(v), 8, 4));
    end
    for (int v = 0; v < 64; v++) begin
      a6 = 6'(v); #1;
      chk("RG(6,4)", r6, ref_res(64'(v), 6, 4));
    end
    for (int v = 0; v < 8; v++) begin
      a3 = 3'(v); #1;
      chk("RG(3,4)", r3, v);
    end
    a32 = '0; #1; chk("RG(32,8) 0", r32, 0);
    a32 = '1; #1; chk("RG(32,8) ones", r32, ref_res(64'(32'hffff_ffff), 32, 8));
    a32 = 32'd256; #1; chk("RG(32,8) 256", r32, 256);
    for (int t = 0; t < 20000; t++) begin
      a32 = $urandom; #1;
      chk("RG(32,8)", r32, ref_res(64'(a32), 32, 8));
    end
    checks++;
    if (n_top == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
