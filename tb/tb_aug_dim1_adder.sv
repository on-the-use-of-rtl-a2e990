// tb_aug_dim1_adder: exhaustive self-checking test of the augmented
// diminished-1 adder at n = 3 and n = 8. For operands a*, b* the (n+1)-bit
// result must be (a* + b* + 1) mod (2^n+1), i.e. the weighted sum of two
// operands whose sum was decreased by one. The case that sets the top bit
// (bitwise complementary operands) must occur. Worked final additions at
// n = 3 are replayed: 011 + 100 -> 8, 1 + 5 -> 7, 000 + 010 -> 3; and at
// n = 2: 3 + 3 -> 2.
module tb_aug_dim1_adder;
  int checks = 0, failures = 0;
  int topbit = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0] a2, b2;
  logic [2:0] r2;
  logic [2:0] a3, b3;
  logic [3:0] r3;
  logic [7:0] a8, b8;
  logic [8:0] r8;

  aug_dim1_adder #(.N(2)) d2 (.a(a2), .b(b2), .r(r2));
  aug_dim1_adder #(.N(3)) d3 (.a(a3), .b(b3), .r(r3));
  aug_dim1_adder          d8 (.a(a8), .b(b8), .r(r8));

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
    a3 = 3'b011; b3 = 3'b100; #1; chk("ex 011+100", r3, 8);
    a3 = 3'd1;   b3 = 3'd5;   #1; chk("ex 1+5", r3, 7);
    a3 = 3'b000; b3 = 3'b010; #1; chk("ex 000+010", r3, 3);
    a2 = 2'd3;   b2 = 2'd3;   #1; chk("ex 3+3", r2, 2);
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        a2 = 2'(a); b2 = 2'(b); #1;
        chk("n2", r2, (a + b + 1) % 5);
      end
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        a3 = 3'(a); b3 = 3'(b); #1;
        chk("n3", r3, (a + b + 1) % 9);
      end
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        a8 = 8'(a); b8 = 8'(b); #1;
        chk("n8", r8, (a + b + 1) % 257);
        if (r8[8]) topbit++;
      end
    checks++;
    if (topbit != 256) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
