// approx_mult8_tb - exhaustive check of the 8-bit approximate multiplier over
// all 65536 operand pairs. Reference: if both high nibbles are zero the
// product is exact; otherwise the high byte is A_hi*B_hi and the low byte is
// the leading-one fill of the low nibbles. Also checks the worked example
// 230 x 50 -> 0x2A7F and counts both modes.
module approx_mult8_tb;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0, n_exact_mode = 0, n_split_mode = 0;

  approx_mult8 #(.H(4)) dut (.a, .b, .p);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] ref_mult(logic [7:0] x, logic [7:0] y);
    logic [7:0] lo = 8'd0;
    if (x[7:4] == 0 && y[7:4] == 0) return 16'(int'(x) * int'(y));
    for (int i = 3; i >= 0; i--)
      if (x[i] || y[i]) begin
        lo = 8'((16'd1 << (i + 5)) - 1);
        break;
      end
    return {8'(int'(x[7:4]) * int'(y[7:4])), lo};
  endfunction

  initial begin
    a = 8'd230; b = 8'd50;
    #1;
    checks++;
    if (p !== 16'h2A7F) begin
      failures++; $display("FAIL worked example: %h", p);
    end
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      checks++;
      if (a[7:4] == 0 && b[7:4] == 0) n_exact_mode++; else n_split_mode++;
      if (p !== ref_mult(a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d = %h expect %h", a, b, p, ref_mult(a, b));
      end
    end
    checks++;
    if (n_exact_mode == 0 || n_split_mode == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
