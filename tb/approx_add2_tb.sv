// approx_add2_tb - exhaustive check of the approximate 2-bit adder.
// All 32 input combinations: the sum bits must equal the low two bits of
// a + b + cin, and cout the carry of a + b alone. Also checks that exactly
// the four fully-propagating combinations with cin = 1 differ from an exact
// adder.
module approx_add2_tb;
  logic [1:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0, inexact = 0;

  approx_add2 dut (.a, .b, .cin, .s, .cout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      int exact, approx;
      {a, b, cin} = 5'(i);
      #1;
      exact  = int'(a) + int'(b) + int'(cin);
      approx = {29'd0, cout, s};
      checks++;
      if (s !== 2'(exact) || cout !== 1'((int'(a) + int'(b)) >> 2)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d s=%0d cout=%0d", a, b, cin, s, cout);
      end
      if (approx != exact) inexact++;
    end
    checks++;
    if (inexact != 4) begin
      failures++;
      $display("FAIL expected 4 inexact combinations, got %0d", inexact);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
