// End-to-end test of tacbm_top at its default sizes (16-bit operands, Z = 10).
//
// Random operand pairs are streamed in with random gaps in in_valid and a
// reset in the middle of the stream. A scoreboard records the cycle of each
// accepted pair; every product must come out on the second rising edge after it was driven, equal
// to the reference model, and nothing may come out for pairs that a reset
// discarded. The test also counts how often each mechanism of the design was
// exercised, and fails if one never was: Booth digits -2, -1, 0, +1, +2,
// a non-zero compensation carry, a product changed by the truncation,
// an idle cycle, and a reset that dropped pairs in flight.
module tacbm_top_tb;
  import tacbm_ref_pkg::*;

  localparam int N = 16, Z = 10, BIAS = 3;
  localparam int NPAIRS = 20000;
  localparam int LATENCY = 2;

  typedef struct {
    logic [N-1:0] a;
    logic [N-1:0] b;
    int           cycle;  // cycle in which the pair was driven
  } item_t;

  logic           clk;
  logic           rst_n;
  logic           in_valid;
  logic [N-1:0]   a, b;
  logic           out_valid;
  logic [2*N-1:0] p;

  int checks = 0, failures = 0;
  int cycle;
  item_t q[$];

  int n_digit[5];      // Booth digits -2..+2 seen
  int n_comp_carry;    // pairs with a non-zero compensation carry
  int n_approx;        // products that differ from the exact product
  int n_idle;          // idle input cycles
  int n_reset_drop;    // pairs discarded by a reset

  tacbm_top dut (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .a        (a),
    .b        (b),
    .out_valid(out_valid),
    .p        (p)
  );

  initial begin
    clk   = 1'b0;
    cycle = 0;
  end
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (10 * NPAIRS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output side: checked just after each rising edge.
  task automatic check_outputs();
    item_t  it;
    longint want;
    if (out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL cycle %0d: unexpected out_valid", cycle);
        return;
      end
      it   = q.pop_front();
      want = ref_product(longint'($signed(it.a)), longint'($signed(it.b)), N, Z, BIAS);
      if (cycle - it.cycle != LATENCY || longint'(p) != want) begin
        failures++;
        $display("FAIL a=%0d b=%0d latency %0d got %h want %h",
                 $signed(it.a), $signed(it.b), cycle - it.cycle, p, want);
      end
      if (sext(longint'(p), 2 * N) != longint'($signed(it.a)) * longint'($signed(it.b)))
        n_approx++;
    end else if (q.size() != 0 && cycle - q[0].cycle >= LATENCY) begin
      checks++;
      failures++;
      $display("FAIL cycle %0d: product of a=%0d b=%0d missing", cycle, $signed(q[0].a),
               $signed(q[0].b));
      void'(q.pop_front());
    end
  endtask

  task automatic note_mechanisms(logic [N-1:0] av, logic [N-1:0] bv);
    for (int i = 0; i < N / 2; i++) n_digit[booth_digit(longint'(bv), i) + 2]++;
    if (ref_carry(longint'($signed(av)), longint'($signed(bv)), N, Z, BIAS) != 0) n_comp_carry++;
  endtask

  initial begin
    int sent;
    void'($urandom(32'd7));
    rst_n    = 1'b0;
    in_valid = 1'b0;
    a        = '0;
    b        = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    sent = 0;
    while (sent < NPAIRS) begin
      @(posedge clk);
      #1;
      check_outputs();
      // a reset pulse in the middle of the stream, with pairs in flight
      if (sent == NPAIRS / 2 && rst_n && q.size() != 0) begin
        rst_n = 1'b0;
        n_reset_drop += q.size();
        q.delete();
        in_valid = 1'b1;  // presented during reset: must be ignored too
        a = 16'($urandom);
        b = 16'($urandom);
        n_reset_drop++;
        continue;
      end
      rst_n = 1'b1;
      if (($urandom % 5) == 0) begin
        in_valid = 1'b0;
        a = 16'($urandom);  // data without valid must be ignored
        b = 16'($urandom);
        n_idle++;
      end else begin
        item_t it;
        in_valid = 1'b1;
        case ($urandom % 8)
          0: a = 16'h8000;
          1: a = 16'h7fff;
          default: a = 16'($urandom);
        endcase
        b = ($urandom % 8 == 0) ? 16'h8000 : 16'($urandom);
        it.a = a;
        it.b = b;
        it.cycle = cycle;
        q.push_back(it);
        note_mechanisms(a, b);
        sent++;
      end
    end
    @(posedge clk);
    #1;
    in_valid = 1'b0;
    check_outputs();
    repeat (LATENCY + 1) begin
      @(posedge clk);
      #1;
      check_outputs();
    end
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d products never came out", q.size());
    end
    $display("mechanisms: digit-2 %0d, digit-1 %0d, digit0 %0d, digit+1 %0d, digit+2 %0d",
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4]);
    $display("mechanisms: compensation carry %0d, approximate products %0d, idle %0d, reset drops %0d",
             n_comp_carry, n_approx, n_idle, n_reset_drop);
    foreach (n_digit[i]) begin
      checks++;
      if (n_digit[i] == 0) begin
        failures++;
        $display("FAIL Booth digit %0d never occurred", i - 2);
      end
    end
    checks += 4;
    if (n_comp_carry == 0) begin failures++; $display("FAIL no compensation carry"); end
    if (n_approx == 0)     begin failures++; $display("FAIL no approximate product"); end
    if (n_idle == 0)       begin failures++; $display("FAIL no idle cycle"); end
    if (n_reset_drop == 0) begin failures++; $display("FAIL no reset in flight"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
