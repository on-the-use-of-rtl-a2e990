// tb_moma_corr: exhaustive self-checking test of the correction-factor
// generator for (K, n) = (8, 8), (4, 3) and (6, 2). For every pattern of
// operand top bits, e must equal -(K + ones) modulo 2^n+1. The (6, 2) case
// reaches e = 2^n, the value that makes the adder skip its correction stage.
module tb_moma_corr;
  int checks = 0, failures = 0;
  int n_top = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0] m8; logic [8:0] e8;
  logic [3:0] m4; logic [3:0] e4;
  logic [5:0] m6; logic [2:0] e6;

  moma_corr                 d8 (.msb(m8), .e(e8));
  moma_corr #(.K(4), .N(3)) d4 (.msb(m4), .e(e4));
  moma_corr #(.K(6), .N(2)) d6 (.msb(m6), .e(e6));

  function automatic longint ref_e(int k, int ones, int n);
    longint m = (longint'(1) << n) + 1;
    return ((-(k + ones)) % m + m) % m;
  endfunction

  task automatic chk(string name, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s mismatch got=%0d exp=%0d", name, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      m8 = 8'(v); #1;
      chk("K8N8", e8, ref_e(8, $countones(m8), 8));
    end
    for (int v = 0; v < 16; v++) begin
      m4 = 4'(v); #1;
      chk("K4N3", e4, ref_e(4, $countones(m4), 3));
    end
    m4 = 4'b0001; #1;
    chk("K4N3 one at 2^n", e4, 4);
    for (int v = 0; v < 64; v++) begin
      m6 = 6'(v); #1;
      chk("K6N2", e6, ref_e(6, $countones(m6), 2));
      if (e6[2]) n_top++;
    end
    checks++;
    if (n_top == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
