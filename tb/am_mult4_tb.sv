// am_mult4_tb - exhaustive check of the 4 x 4 unsigned array multiplier.
module am_mult4_tb;
  logic [3:0] x, y;
  logic [7:0] p;
  int checks = 0, failures = 0;

  am_mult4 #(.H(4)) dut (.x, .y, .p);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {x, y} = 8'(i);
      #1;
      checks++;
      if (int'(p) != int'(x) * int'(y)) begin
        failures++; $display("FAIL %0d * %0d = %0d", x, y, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
