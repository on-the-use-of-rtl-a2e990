// tb_iec_csa_tree: self-checking test of the inverted-EAC carry-save tree.
// Instances with 2, 3, 4 and 9 operands of 8 bits and one with 17 operands of
// 4 bits get random operands; the two outputs must sum to the operand sum
// plus (M - 2) modulo 2^n+1, one for every carry-save stage in the tree.
module tb_iec_csa_tree;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0] o2 [2],  x2, y2;
  logic [7:0] o3 [3],  x3, y3;
  logic [7:0] o4 [4],  x4, y4;
  logic [7:0] o9 [9],  x9, y9;
  logic [3:0] o17 [17], x17, y17;

  iec_csa_tree #(.N(8), .M(2))  d2  (.ops(o2),  .x(x2),  .y(y2));
  iec_csa_tree #(.N(8), .M(3))  d3  (.ops(o3),  .x(x3),  .y(y3));
  iec_csa_tree #(.N(8), .M(4))  d4  (.ops(o4),  .x(x4),  .y(y4));
  iec_csa_tree                  d9  (.ops(o9),  .x(x9),  .y(y9));
  iec_csa_tree #(.N(4), .M(17)) d17 (.ops(o17), .x(x17), .y(y17));

  function automatic longint rmod(longint v, int n);
    longint m = (longint'(1) << n) + 1;
    return ((v % m) + m) % m;
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
    longint s2, s3, s4, s9, s17;
    for (int t = 0; t < 5000; t++) begin
      s2 = 0; s3 = 0; s4 = 0; s9 = 0; s17 = 0;
      foreach (o2[i])  begin o2[i]  = 8'($urandom); s2  += o2[i];  end
      foreach (o3[i])  begin o3[i]  = 8'($urandom); s3  += o3[i];  end
      foreach (o4[i])  begin o4[i]  = 8'($urandom); s4  += o4[i];  end
      foreach (o9[i])  begin o9[i]  = (t < 10) ? 8'hff : 8'($urandom); s9 += o9[i]; end
      foreach (o17[i]) begin o17[i] = 4'($urandom); s17 += o17[i]; end
      #1;
      chk("M2",  rmod(longint'(x2) + y2, 8),   rmod(s2, 8));
      chk("M3",  rmod(longint'(x3) + y3, 8),   rmod(s3 + 1, 8));
      chk("M4",  rmod(longint'(x4) + y4, 8),   rmod(s4 + 2, 8));
      chk("M9",  rmod(longint'(x9) + y9, 8),   rmod(s9 + 7, 8));
      chk("M17", rmod(longint'(x17) + y17, 4), rmod(s17 + 15, 4));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
