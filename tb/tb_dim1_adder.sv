// tb_dim1_adder: exhaustive self-checking test of the diminished-1 (inverted
// end-around-carry) adder at n = 3, 4 and 8. Expected: s = (a + b) mod 2^n
// plus the complement of the carry out, wrapped to n bits, and h = a ^ b.
// Both values of the end-around carry must occur. The chained diminished-1
// additions of the worked multi-operand examples are also replayed:
// n = 3: 7+4 -> 3, 5+0 -> 6, 3+6 -> 1; n = 2: 1+1 -> 3, 3+1 -> 0, 0+1 -> 2, 0+2 -> 3.
module tb_dim1_adder;
  int checks = 0, failures = 0;
  int wrap0 = 0, wrap1 = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0] a2, b2, s2, h2;
  logic [2:0] a3, b3, s3, h3;
  logic [3:0] a4, b4, s4, h4;
  logic [7:0] a8, b8, s8, h8;

  dim1_adder #(.N(2)) d2 (.a(a2), .b(b2), .s(s2), .h(h2));
  dim1_adder #(.N(3)) d3 (.a(a3), .b(b3), .s(s3), .h(h3));
  dim1_adder #(.N(4)) d4 (.a(a4), .b(b4), .s(s4), .h(h4));
  dim1_adder          d8 (.a(a8), .b(b8), .s(s8), .h(h8));

  function automatic longint ref_sum(longint a, longint b, int n);
    longint m = longint'(1) << n;
    longint cout = ((a + b) >= m) ? 1 : 0;
    return ((a + b) % m + (1 - cout)) % m;
  endfunction

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
    a3 = 3'd7; b3 = 3'd4; #1; chk("ex 7+4", s3, 3);
    a3 = 3'd5; b3 = 3'd0; #1; chk("ex 5+0", s3, 6);
    a3 = 3'd3; b3 = 3'd6; #1; chk("ex 3+6", s3, 1);
    a2 = 2'd1; b2 = 2'd1; #1; chk("ex 1+1", s2, 3);
    a2 = 2'd3; b2 = 2'd1; #1; chk("ex 3+1", s2, 0);
    a2 = 2'd0; b2 = 2'd1; #1; chk("ex 0+1", s2, 2);
    a2 = 2'd0; b2 = 2'd2; #1; chk("ex 0+2", s2, 3);
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        a2 = 2'(a); b2 = 2'(b); #1;
        chk("n2 s", s2, ref_sum(a, b, 2));
        chk("n2 h", h2, a ^ b);
      end
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        a3 = 3'(a); b3 = 3'(b); #1;
        chk("n3 s", s3, ref_sum(a, b, 3));
        chk("n3 h", h3, a ^ b);
      end
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        a4 = 4'(a); b4 = 4'(b); #1;
        chk("n4 s", s4, ref_sum(a, b, 4));
      end
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        a8 = 8'(a); b8 = 8'(b); #1;
        chk("n8 s", s8, ref_sum(a, b, 8));
        chk("n8 h", h8, a ^ b);
        if (a + b >= 256) wrap1++; else wrap0++;
      end
    checks++;
    if (wrap0 == 0 || wrap1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
