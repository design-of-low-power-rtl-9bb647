// approx_booth_top_trunc_tb - the top with partial-product truncation on:
// columns below 8 of the 16-bit product and below 16 of the 32-bit product
// are dropped. Random and edge operands on both Booth multipliers are
// compared with the integer model; the test requires that truncation
// changed some products and that the error stays below the bound of the
// dropped columns (every digit loses less than 2^cut at its weight).
module approx_booth_top_trunc_tb;
  import booth_ref_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        go16 = 0, go32 = 0;
  logic [15:0] a16 = 0, b16 = 0;
  logic [31:0] a32 = 0, b32 = 0;
  logic [31:0] p16;
  logic [63:0] p32;
  logic        done16, busy16, done32, busy32;
  logic [7:0]  am_a = 0, am_b = 0;
  logic [15:0] am_p;
  int checks = 0, failures = 0, n_trunc = 0;

  approx_booth_top #(.TRUNC_16(8), .TRUNC_32(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(logic [15:0] x16, logic [15:0] y16, logic [31:0] x32, logic [31:0] y32);
    longint m16, m32, u16, u32;
    @(negedge clk); a16 = x16; b16 = y16; a32 = x32; b32 = y32; go16 = 1; go32 = 1;
    @(negedge clk); go16 = 0; go32 = 0;
    while (!done32) @(negedge clk);
    m16 = booth_model(longint'($signed(x16)), longint'($signed(y16)), 16, 8, 8);
    u16 = booth_model(longint'($signed(x16)), longint'($signed(y16)), 16, 8, 0);
    m32 = booth_model(longint'($signed(x32)), longint'($signed(y32)), 32, 16, 16);
    u32 = booth_model(longint'($signed(x32)), longint'($signed(y32)), 32, 16, 0);
    if (m16 != u16) n_trunc++;
    checks += 4;
    if (longint'($signed(p16)) != m16) begin failures++; $display("FAIL p16 got %0d expect %0d", $signed(p16), m16); end
    if (longint'(p32) != m32) begin failures++; $display("FAIL p32 got %0d expect %0d", longint'(p32), m32); end
    // truncation only removes value: 0 <= untruncated - truncated < digits * 2^cut
    if (u16 - m16 < 0 || u16 - m16 >= 6 * 256) begin failures++; $display("FAIL 16-bit truncation error %0d", u16 - m16); end
    if (u32 - m32 < 0 || u32 - m32 >= 11 * 65536) begin failures++; $display("FAIL 32-bit truncation error %0d", u32 - m32); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    op(16'h8000, 16'h8000, 32'h8000_0000, 32'h8000_0000);
    op(16'h7FFF, 16'hFFFF, 32'h7FFF_FFFF, 32'hFFFF_FFFF);
    for (int i = 0; i < 500; i++) op(16'($urandom), 16'($urandom), $urandom, $urandom);
    checks++;
    if (n_trunc == 0) begin failures++; $display("FAIL truncation never changed a product"); end
    $display("truncation changed %0d of 502 16-bit products", n_trunc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
