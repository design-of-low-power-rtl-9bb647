// am_apg_tb - exhaustive check of the approximate product generator. The
// reference scans the two low nibbles from bit 3 down; at the first bit
// where either is 1, all product bits from that bit + 4 downward are 1.
// Includes the worked example 0110, 0010 -> 0111_1111.
module am_apg_tb;
  logic [3:0] a_lo, b_lo;
  logic [7:0] p_lo;
  int checks = 0, failures = 0;

  am_apg #(.H(4)) dut (.a_lo, .b_lo, .p_lo);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_apg(logic [3:0] x, logic [3:0] y);
    for (int i = 3; i >= 0; i--)
      if (x[i] || y[i]) return 8'((16'd1 << (i + 5)) - 1);
    return 8'd0;
  endfunction

  initial begin
    a_lo = 4'b0110; b_lo = 4'b0010;
    #1;
    checks++;
    if (p_lo !== 8'b0111_1111) begin
      failures++; $display("FAIL worked example gives %b", p_lo);
    end
    for (int i = 0; i < 256; i++) begin
      {a_lo, b_lo} = 8'(i);
      #1;
      checks++;
      if (p_lo !== ref_apg(a_lo, b_lo)) begin
        failures++; $display("FAIL a=%b b=%b p=%b", a_lo, b_lo, p_lo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
