// am_ctrl_tb - exhaustive check of the control block: ctrl must be 1 exactly
// when either high nibble is non-zero.
module am_ctrl_tb;
  logic [3:0] a_hi, b_hi;
  logic       ctrl;
  int checks = 0, failures = 0;

  am_ctrl #(.H(4)) dut (.a_hi, .b_hi, .ctrl);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a_hi, b_hi} = 8'(i);
      #1;
      checks++;
      if (ctrl !== (a_hi != 0 || b_hi != 0)) begin
        failures++; $display("FAIL a_hi=%b b_hi=%b ctrl=%b", a_hi, b_hi, ctrl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
