// booth_r8_encoder_tb - exhaustive check of the radix-8 recoder: for all 16
// quartets the signed digit must be -4*q3 + 2*q2 + q1 + q0, and a zero
// digit must carry no sign.
module booth_r8_encoder_tb;
  import booth_pkg::*;
  logic [3:0]   q;
  booth_digit_t digit;
  int checks = 0, failures = 0;

  booth_r8_encoder dut (.quartet(q), .digit(digit));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int expect_d, got_d;
      q = 4'(i);
      #1;
      expect_d = -4 * int'(q[3]) + 2 * int'(q[2]) + int'(q[1]) + int'(q[0]);
      got_d    = digit.neg ? -int'(digit.mag) : int'(digit.mag);
      checks++;
      if (got_d != expect_d || (digit.mag == MAG_0 && digit.neg)) begin
        failures++;
        $display("FAIL quartet=%b expect %0d got neg=%b mag=%0d", q, expect_d, digit.neg, digit.mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
