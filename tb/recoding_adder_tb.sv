// recoding_adder_tb - checks the 3Y generator.
// An exact instance (APPROX_BITS = 0) must give 3*y; the default approximate
// instance (low N/2 bits approximate) must match the slice-by-slice integer
// model, never exceed 3*y, and stay within the error bound of the cut
// carries. Edge values plus random values, N = 16 and N = 32.
module recoding_adder_tb;
  import booth_ref_pkg::*;
  logic [15:0] y16;
  logic [17:0] y3_ex16, y3_ap16;
  logic [31:0] y32;
  logic [33:0] y3_ap32;
  int checks = 0, failures = 0, approx_err = 0;

  recoding_adder #(.N(16), .APPROX_BITS(0)) dut_exact (.y(y16), .y3(y3_ex16));
  recoding_adder #(.N(16))                  dut_apx16 (.y(y16), .y3(y3_ap16));
  recoding_adder #(.N(32))                  dut_apx32 (.y(y32), .y3(y3_ap32));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(logic [15:0] v);
    longint yv, ex, ap;
    y16 = v;
    #1;
    yv = longint'($signed(v));
    ex = 3 * yv;
    ap = longint'($signed(y3_ap16));
    checks += 3;
    if (longint'($signed(y3_ex16)) != ex) begin
      failures++; $display("FAIL exact 3Y y=%0d got %0d", yv, $signed(y3_ex16));
    end
    if (ap != y3_model(yv, 16, 8)) begin
      failures++; $display("FAIL approx 3Y y=%0d got %0d model %0d", yv, ap, y3_model(yv, 16, 8));
    end
    // each of the 4 slices can lose at most 4 at its weight: 4*(1+4+16+64) = 340
    if (ap > ex || ex - ap > 340) begin
      failures++; $display("FAIL approx 3Y error y=%0d err %0d", yv, ex - ap);
    end
    if (ap != ex) approx_err++;
  endtask

  task automatic check32(logic [31:0] v);
    longint yv;
    y32 = v;
    #1;
    yv = longint'($signed(v));
    checks++;
    if (longint'($signed(y3_ap32)) != y3_model(yv, 32, 16)) begin
      failures++; $display("FAIL approx 3Y32 y=%0d got %0d", yv, $signed(y3_ap32));
    end
  endtask

  initial begin
    check16(16'h0000); check16(16'h0001); check16(16'h7FFF);
    check16(16'h8000); check16(16'hFFFF); check16(16'h5555); check16(16'hAAAA);
    check32(32'h0); check32(32'h7FFF_FFFF); check32(32'h8000_0000); check32(32'h5555_5555);
    for (int i = 0; i < 4000; i++) begin
      check16(16'($urandom));
      check32($urandom);
    end
    checks++;
    if (approx_err == 0) begin
      failures++; $display("FAIL approximation never changed 3Y");
    end
    $display("approximate 3Y differed from exact in %0d cases", approx_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
