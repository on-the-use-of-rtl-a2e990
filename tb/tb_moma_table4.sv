// tb_moma_table4: runs the multi-operand adder at the nine evaluated sizes
// (k, n) = (4,4) (8,4) (12,4) (4,8) (8,8) (12,8) (4,16) (8,16) (12,16) with
// random (n+1)-bit residues (2^n made frequent) and the all-2^n and
// all-(2^n - 1) operand sets, comparing with the integer sum modulo 2^n+1.
module tb_moma_table4;
  localparam int NCFG = 9;
  localparam int KS [NCFG] = '{4, 8, 12, 4, 8, 12, 4, 8, 12};
  localparam int NS [NCFG] = '{4, 4, 4, 8, 8, 8, 16, 16, 16};

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  // one set of 12 operand values in [0, 2^16]; each configuration takes its
  // first k, reduced into its own range
  longint vals [12];
  logic [16:0] r_out [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic [NS[c]:0] ops [KS[c]];
    logic [NS[c]:0] r;
    always_comb
      for (int i = 0; i < KS[c]; i++)
        ops[i] = (vals[i] == 65536) ? (NS[c]+1)'(longint'(1) << NS[c])
                                    : (NS[c]+1)'(vals[i] % (longint'(1) << NS[c]));
    weighted_moma #(.K(KS[c]), .N(NS[c])) dut (.ops(ops), .r(r));
    assign r_out[c] = 17'(r);
  end

  function automatic longint ref_sum(int k, int n);
    longint m = (longint'(1) << n) + 1;
    longint s = 0;
    for (int i = 0; i < k; i++)
      s += (vals[i] == 65536) ? (longint'(1) << n) : vals[i] % (longint'(1) << n);
    return s % m;
  endfunction

  task automatic check_all();
    for (int c = 0; c < NCFG; c++) begin
      checks++;
      if (longint'(r_out[c]) != ref_sum(KS[c], NS[c])) begin
        failures++;
        if (failures < 10) $display("MOMA(%0d,%0d) mismatch got=%0d exp=%0d", KS[c], NS[c], r_out[c],
                                    ref_sum(KS[c], NS[c]));
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
    foreach (vals[i]) vals[i] = 65536;
    #1; check_all();
    foreach (vals[i]) vals[i] = 65535;
    #1; check_all();
    for (int t = 0; t < 5000; t++) begin
      foreach (vals[i]) vals[i] = ($urandom_range(3) == 0) ? 65536 : longint'($urandom_range(65535));
      #1; check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
