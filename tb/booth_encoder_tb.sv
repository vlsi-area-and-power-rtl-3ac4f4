// Self-checking test of booth_encoder: all eight three-bit groups, each
// compared with the digit value -2*g[2] + g[1] + g[0].
module booth_encoder_tb;
  import tacbm_pkg::*;

  logic [2:0]   grp;
  booth_digit_t dig;
  int checks = 0, failures = 0;

  booth_encoder dut (.grp(grp), .dig(dig));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      int d, mag;
      grp = 3'(g);
      #1;
      d   = -2 * ((g >> 2) & 1) + ((g >> 1) & 1) + (g & 1);
      mag = (d < 0) ? -d : d;
      checks++;
      if (dig.neg !== (d < 0) || dig.one !== (mag == 1) || dig.two !== (mag == 2)) begin
        failures++;
        $display("FAIL grp=%b digit=%0d got neg=%b one=%b two=%b", grp, d, dig.neg, dig.one, dig.two);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
