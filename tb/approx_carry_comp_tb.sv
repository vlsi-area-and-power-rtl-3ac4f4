// Self-checking test of approx_carry_comp: the carry must equal
// (2*popcount(col_hi) + popcount(col_lo) + BIAS) / 4. The 9-slot default
// instance (16-bit multiplier) is tested on random inputs plus the all-zero
// and all-one corners; a small 3+2-slot instance with BIAS = 1 exhaustively.
module approx_carry_comp_tb;

  logic [8:0] hi1, lo1;
  logic [2:0] c1;
  logic [2:0] hi2;
  logic [1:0] lo2;
  logic [1:0] c2;
  int checks = 0, failures = 0;

  approx_carry_comp dut1 (.col_hi(hi1), .col_lo(lo1), .carry(c1));
  approx_carry_comp #(.W_HI(3), .W_LO(2), .BIAS(1)) dut2 (.col_hi(hi2), .col_lo(lo2), .carry(c2));

  task automatic check1(logic [8:0] h, logic [8:0] l);
    int want;
    hi1 = h;
    lo1 = l;
    #1;
    want = (2 * $countones(h) + $countones(l) + 3) / 4;
    checks++;
    if (int'(c1) != want) begin
      failures++;
      $display("FAIL hi=%b lo=%b got %0d want %0d", h, l, c1, want);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check1('0, '0);
    check1('1, '1);
    for (int k = 0; k < 2000; k++) check1(9'($urandom), 9'($urandom));
    for (int v = 0; v < 32; v++) begin
      int want;
      {hi2, lo2} = 5'(v);
      #1;
      want = (2 * $countones(hi2) + $countones(lo2) + 1) / 4;
      checks++;
      if (int'(c2) != want) begin
        failures++;
        $display("FAIL small hi=%b lo=%b got %0d want %0d", hi2, lo2, c2, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
