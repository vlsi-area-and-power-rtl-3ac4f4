// Accuracy sweep over the truncation factor of the 16-bit multiplier.
//
// Instances with Z = 4, 6, 8, 10, 12, 14 and 16 see the same 20,000 random
// operand pairs. Each product is compared bit for bit with the reference
// model, and the mean relative error (MRED) and mean error against the exact
// product are printed per Z. The MRED must grow with Z in steps of 4 columns
// (Z = 4, 8, 12, 16), and at Z = 10 it must be below 0.02 %.
module tacbm_zsweep_tb;
  import tacbm_ref_pkg::*;

  localparam int N = 16, BIAS = 3, NZ = 7, NPAIRS = 20000;
  localparam int ZS[NZ] = '{4, 6, 8, 10, 12, 14, 16};

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p[NZ];
  int checks = 0, failures = 0;
  real    red_sum[NZ];
  longint err_sum[NZ];
  real    mred[NZ];

  for (genvar k = 0; k < NZ; k++) begin : g_z
    tacbm_mult #(.N(N), .Z(ZS[k])) dut (.a(a), .b(b), .p(p[k]));
  end

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    void'($urandom(32'd99));
    foreach (red_sum[k]) begin
      red_sum[k] = 0.0;
      err_sum[k] = 0;
    end
    n = 0;
    for (int t = 0; t < NPAIRS; t++) begin
      longint exact;
      a = 16'($urandom);
      b = 16'($urandom);
      #1;
      exact = longint'($signed(a)) * longint'($signed(b));
      if (exact != 0) n++;
      for (int k = 0; k < NZ; k++) begin
        longint want, e;
        want = ref_product(longint'($signed(a)), longint'($signed(b)), N, ZS[k], BIAS);
        checks++;
        if (longint'(p[k]) != want) begin
          failures++;
          $display("FAIL Z=%0d a=%0d b=%0d got %h want %h", ZS[k], $signed(a), $signed(b), p[k], want);
        end
        if (exact != 0) begin
          e = sext(longint'(p[k]), 2 * N) - exact;
          err_sum[k] += e;
          red_sum[k] += ((e < 0) ? -real'(e) : real'(e)) / ((exact < 0) ? -real'(exact) : real'(exact));
        end
      end
    end
    for (int k = 0; k < NZ; k++) begin
      mred[k] = 100.0 * red_sum[k] / real'(n);
      $display("Z=%2d  MRED %9.6f %%  mean error %10.2f", ZS[k], mred[k], real'(err_sum[k]) / real'(n));
    end
    checks += 4;
    if (!(mred[0] < mred[2])) begin failures++; $display("FAIL MRED(Z=4) >= MRED(Z=8)"); end
    if (!(mred[2] < mred[4])) begin failures++; $display("FAIL MRED(Z=8) >= MRED(Z=12)"); end
    if (!(mred[4] < mred[6])) begin failures++; $display("FAIL MRED(Z=12) >= MRED(Z=16)"); end
    if (!(mred[3] < 0.02))    begin failures++; $display("FAIL MRED(Z=10) not below 0.02 %%"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
