// Self-checking test of tacbm_mult.
//  * 16-bit, Z = 10 (default): corner operands and 50,000 random pairs, each
//    compared bit for bit with the reference model; the low Z product bits
//    must be zero; each error must stay below 4*2^Z; the mean relative error against the exact product must
//    stay below 0.02 %, and the mean error must be small against 2^Z.
//  * 8-bit with Z = 4 and Z = 2: every operand pair against the model.
module tacbm_mult_tb;
  import tacbm_ref_pkg::*;

  localparam int N = 16, Z = 10, BIAS = 3;
  localparam int NS = 8;

  logic [N-1:0]    a, b;
  logic [2*N-1:0]  p;
  logic [NS-1:0]   as, bs;
  logic [2*NS-1:0] ps4, ps2;
  int checks = 0, failures = 0;

  tacbm_mult dut (.a(a), .b(b), .p(p));
  tacbm_mult #(.N(NS), .Z(4)) dut4 (.a(as), .b(bs), .p(ps4));
  tacbm_mult #(.N(NS), .Z(2)) dut2 (.a(as), .b(bs), .p(ps2));

  real    red_sum = 0.0;
  longint err_sum = 0;
  int     nred = 0;

  task automatic check_full(logic [N-1:0] av, logic [N-1:0] bv);
    longint want, exact, got;
    a = av;
    b = bv;
    #1;
    want  = ref_product(longint'($signed(av)), longint'($signed(bv)), N, Z, BIAS);
    exact = longint'($signed(av)) * longint'($signed(bv));
    got   = longint'(p);
    checks++;
    if (got != want || p[Z-1:0] != '0) begin
      failures++;
      $display("FAIL a=%0d b=%0d got %h want %h", $signed(av), $signed(bv), p, want);
    end
    if (exact != 0) begin
      longint e;
      e = sext(got, 2 * N) - exact;
      checks++;
      if (e >= (64'sd1 <<< (Z + 2)) || e <= -((64'sd1 <<< (Z + 2)))) begin
        failures++;
        $display("FAIL a=%0d b=%0d error %0d out of bound", $signed(av), $signed(bv), e);
      end
      err_sum += e;
      red_sum += ((e < 0) ? -real'(e) : real'(e)) / ((exact < 0) ? -real'(exact) : real'(exact));
      nred++;
    end
  endtask

  initial begin : watchdog
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [N-1:0] corners[6] = '{16'h8000, 16'h7fff, 16'hffff, 16'h0001, 16'h0000, 16'h5555};
    void'($urandom(32'd20250));
    foreach (corners[i]) foreach (corners[j]) check_full(corners[i], corners[j]);
    for (int k = 0; k < 50000; k++) check_full(16'($urandom), 16'($urandom));
    begin
      real mred, merr;
      mred = 100.0 * red_sum / real'(nred);
      merr = real'(err_sum) / real'(nred);
      $display("16x16 Z=%0d: MRED %f %%, mean error %f (2^Z = %0d)", Z, mred, merr, 1 << Z);
      checks++;
      if (!(mred < 0.02)) begin
        failures++;
        $display("FAIL MRED %f %% not below 0.02 %%", mred);
      end
      checks++;
      if (merr > 128.0 || merr < -128.0) begin
        failures++;
        $display("FAIL mean error %f not centred", merr);
      end
    end
    for (int x = 0; x < (1 << NS); x++) begin
      for (int y = 0; y < (1 << NS); y++) begin
        longint w4, w2;
        as = NS'(x);
        bs = NS'(y);
        #1;
        w4 = ref_product(longint'($signed(as)), longint'($signed(bs)), NS, 4, BIAS);
        w2 = ref_product(longint'($signed(as)), longint'($signed(bs)), NS, 2, BIAS);
        checks++;
        if (longint'(ps4) != w4 || longint'(ps2) != w2) begin
          failures++;
          if (failures < 10)
            $display("FAIL 8-bit a=%0d b=%0d Z4 got %h want %h, Z2 got %h want %h",
                     $signed(as), $signed(bs), ps4, w4, ps2, w2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
