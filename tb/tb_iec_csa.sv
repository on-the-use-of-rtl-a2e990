// tb_iec_csa: self-checking test of one inverted end-around-carry carry-save
// stage. A 4-bit instance is checked exhaustively and an 8-bit instance with
// random operands; for every input the two outputs must sum to x + y + z + 1
// modulo 2^n+1 (reference computed with integer arithmetic here). Both the
// complemented and the plain end-around carry are required to occur.
module tb_iec_csa;
  int checks = 0, failures = 0;
  int eac0 = 0, eac1 = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [3:0] x4, y4, z4, s4, c4;
  logic [7:0] x8, y8, z8, s8, c8;

  iec_csa #(.N(4)) dut4 (.x(x4), .y(y4), .z(z4), .s(s4), .c(c4));
  iec_csa          dut8 (.x(x8), .y(y8), .z(z8), .s(s8), .c(c8));

  function automatic longint rmod(longint v, int n);
    longint m = (longint'(1) << n) + 1;
    return ((v % m) + m) % m;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        for (int c = 0; c < 16; c++) begin
          x4 = 4'(a); y4 = 4'(b); z4 = 4'(c);
          #1;
          checks++;
          if (rmod(longint'(s4) + longint'(c4), 4) != rmod(a + b + c + 1, 4)) begin
            failures++;
            if (failures < 10) $display("N=4 mismatch x=%0d y=%0d z=%0d s=%0d c=%0d", a, b, c, s4, c4);
          end
          // bit 3 majority decides the end-around carry
          if ((a[3] + b[3] + c[3]) >= 2) eac1++; else eac0++;
        end
    for (int t = 0; t < 20000; t++) begin
      x8 = 8'($urandom); y8 = 8'($urandom); z8 = 8'($urandom);
      #1;
      checks++;
      if (rmod(longint'(s8) + longint'(c8), 8) != rmod(longint'(x8) + longint'(y8) + longint'(z8) + 1, 8)) begin
        failures++;
        if (failures < 10) $display("N=8 mismatch x=%0d y=%0d z=%0d", x8, y8, z8);
      end
    end
    checks++;
    if (eac0 == 0 || eac1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
