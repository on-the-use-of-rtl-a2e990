// tb_weighted_translator: exhaustive self-checking test of the translator at
// n = 3 and n = 8: the outputs A*, B* must satisfy A* + B* = A + B - 1
// modulo 2^n+1 for every pair of n-bit operands.
module tb_weighted_translator;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [2:0] a3, b3, as3, bs3;
  logic [7:0] a8, b8, as8, bs8;

  weighted_translator #(.N(3)) d3 (.a(a3), .b(b3), .as_o(as3), .bs_o(bs3));
  weighted_translator          d8 (.a(a8), .b(b8), .as_o(as8), .bs_o(bs8));

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
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        a3 = 3'(a); b3 = 3'(b); #1;
        chk("n3", (int'(as3) + int'(bs3)) % 9, (a + b - 1 + 9) % 9);
      end
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        a8 = 8'(a); b8 = 8'(b); #1;
        chk("n8", (int'(as8) + int'(bs8)) % 257, (a + b - 1 + 257) % 257);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
