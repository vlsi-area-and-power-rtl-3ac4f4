// Self-checking test of booth_pp_gen: for every digit in {-2..+2} and for
// corner and random multiplicands, signed(row) + neg must equal digit * A.
// A 16-bit instance is tested on random values, a 6-bit one exhaustively.
module booth_pp_gen_tb;
  import tacbm_pkg::*;

  localparam int N1 = 16;
  localparam int N2 = 6;

  logic [N1-1:0] a1;
  logic [N2-1:0] a2;
  booth_digit_t  dig;
  logic [N1:0]   row1;
  logic [N2:0]   row2;
  logic          neg1, neg2;
  int checks = 0, failures = 0;

  booth_pp_gen #(.N(N1)) dut1 (.a(a1), .dig(dig), .row(row1), .neg(neg1));
  booth_pp_gen #(.N(N2)) dut2 (.a(a2), .dig(dig), .row(row2), .neg(neg2));

  function automatic booth_digit_t to_dig(int d);
    booth_digit_t r;
    r.neg = (d < 0);
    r.one = (d == 1) || (d == -1);
    r.two = (d == 2) || (d == -2);
    return r;
  endfunction

  task automatic check1(int d, logic [N1-1:0] av);
    longint got, want;
    dig = to_dig(d);
    a1  = av;
    #1;
    got  = longint'($signed(row1)) + longint'(neg1);
    want = longint'(d) * longint'($signed(av));
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL N=%0d d=%0d a=%0d got %0d want %0d", N1, d, $signed(av), got, want);
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
    for (int d = -2; d <= 2; d++) begin
      check1(d, 16'h8000);
      check1(d, 16'h7fff);
      check1(d, 16'hffff);
      check1(d, 16'h0000);
      for (int k = 0; k < 200; k++) check1(d, 16'($urandom));
      for (int av = 0; av < (1 << N2); av++) begin
        longint got, want;
        dig = to_dig(d);
        a2  = N2'(av);
        #1;
        got  = longint'($signed(row2)) + longint'(neg2);
        want = longint'(d) * longint'($signed(a2));
        checks++;
        if (got != want) begin
          failures++;
          $display("FAIL N=%0d d=%0d a=%0d got %0d want %0d", N2, d, $signed(a2), got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
