// tb_weighted_mod_adder: exhaustive self-checking test of the two-operand
// weighted modulo 2^n+1 adder at n = 4 and n = 8: r must equal (A + B) mod
// (2^n+1). Results of 2^n (top bit set), results that needed the -(2^n+1)
// correction and results that did not must all occur. Instances at n = 16
// and n = 32 get random operands and the operand pairs that sum to 2^n.
module tb_weighted_mod_adder;
  int checks = 0, failures = 0;
  int n_top = 0, n_wrap = 0, n_plain = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [3:0] a4, b4;
  logic [4:0] r4;
  logic [7:0] a8, b8;
  logic [8:0] r8;

  weighted_mod_adder #(.N(4)) d4 (.a(a4), .b(b4), .r(r4));
  weighted_mod_adder          d8 (.a(a8), .b(b8), .r(r8));

  logic [15:0] a16, b16;
  logic [16:0] r16;
  logic [31:0] a32, b32;
  logic [32:0] r32;
  weighted_mod_adder #(.N(16)) d16 (.a(a16), .b(b16), .r(r16));
  weighted_mod_adder #(.N(32)) d32 (.a(a32), .b(b32), .r(r32));

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
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        a4 = 4'(a); b4 = 4'(b); #1;
        chk("n4", r4, (a + b) % 17);
      end
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        a8 = 8'(a); b8 = 8'(b); #1;
        chk("n8", r8, (a + b) % 257);
        if (a + b == 256) n_top++;
        else if (a + b > 256) n_wrap++;
        else n_plain++;
      end
    for (int t = 0; t < 20000; t++) begin
      a16 = 16'($urandom); b16 = (t % 4 == 0) ? 16'(65536 - int'(a16)) : 16'($urandom);
      a32 = $urandom;      b32 = (t % 4 == 0) ? 32'(64'h1_0000_0000 - longint'(a32)) : $urandom;
      #1;
      chk("n16", r16, (longint'(a16) + longint'(b16)) % 65537);
      chk("n32", r32, (longint'(a32) + longint'(b32)) % 64'h1_0000_0001);
    end
    $display("results 2^n=%0d wrapped=%0d plain=%0d", n_top, n_wrap, n_plain);
    checks++;
    if (n_top == 0 || n_wrap == 0 || n_plain == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
