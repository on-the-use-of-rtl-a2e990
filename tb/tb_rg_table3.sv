// tb_rg_table3: runs the residue generator at the nine evaluated sizes
// (k, n) = (8,4) (16,4) (32,4) (16,8) (32,8) (64,8) (32,16) (64,16) (128,16)
// with random inputs plus all-zero and all-one words, and compares every
// result with a bit-serial reference residue modulo 2^n+1.
module tb_rg_table3;
  localparam int NCFG = 9;
  localparam int KS [NCFG] = '{8, 16, 32, 16, 32, 64, 32, 64, 128};
  localparam int NS [NCFG] = '{4, 4, 4, 8, 8, 8, 16, 16, 16};

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [127:0] a_in;
  logic [16:0]  r_out [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic [NS[c]:0] r;
    residue_generator #(.K(KS[c]), .N(NS[c])) dut (.a(a_in[KS[c]-1:0]), .r(r));
    assign r_out[c] = 17'(r);
  end

  function automatic longint ref_res(logic [127:0] v, int k, int n);
    longint m = (longint'(1) << n) + 1;
    longint r = 0;
    for (int i = k - 1; i >= 0; i--) r = (2 * r + longint'(v[i])) % m;
    return r;
  endfunction

  task automatic check_all();
    for (int c = 0; c < NCFG; c++) begin
      checks++;
      if (longint'(r_out[c]) != ref_res(a_in, KS[c], NS[c])) begin
        failures++;
        if (failures < 10) $display("RG(%0d,%0d) mismatch got=%0d exp=%0d", KS[c], NS[c], r_out[c],
                                    ref_res(a_in, KS[c], NS[c]));
      end
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
    a_in = '0; #1; check_all();
    a_in = '1; #1; check_all();
    for (int t = 0; t < 5000; t++) begin
      a_in = {$urandom, $urandom, $urandom, $urandom};
      #1; check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
