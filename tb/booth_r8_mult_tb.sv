// booth_r8_mult_tb - checks the sequential radix-8 Booth multiplier.
// Four instances run the same operands:
//   apx16  N = 16, default approximation (low 8 bits of 3Y), no truncation
//   ex16   N = 16, exact 3Y: must give exactly a*b
//   tr16   N = 16, default approximation, partial-product columns below 8
//          truncated
//   apx32  N = 32, default approximation (low 16 bits of 3Y)
// Every product is compared with the digit-by-digit integer model, and the
// exact instance with a*b. The go-to-done latency must be ceil(N/3) + 2
// cycles (8 and 13), done must last one cycle, and the product must hold
// after done.
module booth_r8_mult_tb;
  import booth_ref_pkg::*;
  logic clk = 0, rst_n = 0, go = 0;
  logic [15:0] a16, b16;
  logic [31:0] a32, b32;
  logic [31:0] p_apx16, p_ex16, p_tr16;
  logic [63:0] p_apx32;
  logic d_apx16, d_ex16, d_tr16, d_apx32;
  logic b_apx16, b_ex16, b_tr16, b_apx32;
  int checks = 0, failures = 0, approx_diff = 0, trunc_diff = 0;

  booth_r8_mult #(.N(16))                  apx16 (.clk, .rst_n, .go, .a(a16), .b(b16), .p(p_apx16), .done(d_apx16), .busy(b_apx16));
  booth_r8_mult #(.N(16), .APPROX_BITS(0)) ex16  (.clk, .rst_n, .go, .a(a16), .b(b16), .p(p_ex16),  .done(d_ex16),  .busy(b_ex16));
  booth_r8_mult #(.N(16), .TRUNC_BITS(8))  tr16  (.clk, .rst_n, .go, .a(a16), .b(b16), .p(p_tr16),  .done(d_tr16),  .busy(b_tr16));
  booth_r8_mult #(.N(32))                  apx32 (.clk, .rst_n, .go, .a(a32), .b(b32), .p(p_apx32), .done(d_apx32), .busy(b_apx32));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint expect_v, int bits);
    longint mask = (bits == 64) ? -1 : ((longint'(1) << bits) - 1);
    checks++;
    if ((got & mask) != (expect_v & mask)) begin
      failures++;
      $display("FAIL %s a16=%0d b16=%0d a32=%0d b32=%0d got %h expect %h", what,
               $signed(a16), $signed(b16), $signed(a32), $signed(b32), got & mask, expect_v & mask);
    end
  endtask

  task automatic run_op(logic [15:0] x16, logic [15:0] y16, logic [31:0] x32, logic [31:0] y32);
    int cyc = 0;
    bit seen16 = 0;
    longint sa16, sb16, sa32, sb32;
    @(negedge clk);
    a16 = x16; b16 = y16; a32 = x32; b32 = y32; go = 1;
    sa16 = longint'($signed(x16)); sb16 = longint'($signed(y16));
    sa32 = longint'($signed(x32)); sb32 = longint'($signed(y32));
    @(negedge clk); go = 0;
    forever begin
      cyc++;
      if (d_apx16) begin
        seen16 = 1;
        checks++;
        if (cyc != 8 || !d_ex16 || !d_tr16) begin
          failures++; $display("FAIL 16-bit latency %0d, expected 8", cyc);
        end
        check("apx16", longint'($signed(p_apx16)), booth_model(sa16, sb16, 16, 8, 0), 32);
        check("ex16",  longint'($signed(p_ex16)),  sa16 * sb16, 32);
        check("tr16",  longint'($signed(p_tr16)),  booth_model(sa16, sb16, 16, 8, 8), 32);
        if (longint'($signed(p_apx16)) != sa16 * sb16) approx_diff++;
        if (p_tr16 != p_apx16) trunc_diff++;
      end
      if (d_apx32 || cyc > 20) break;
      @(negedge clk);
    end
    checks++;
    if (cyc != 13 || !seen16) begin
      failures++; $display("FAIL 32-bit latency %0d, expected 13 (16-bit seen %0b)", cyc, seen16);
    end
    check("apx32", longint'(p_apx32), booth_model(sa32, sb32, 32, 16, 0), 64);
    // done is a single-cycle pulse and the product holds afterwards
    @(negedge clk);
    checks++;
    if (d_apx32 || b_apx32 || longint'(p_apx32) != (booth_model(sa32, sb32, 32, 16, 0))) begin
      failures++; $display("FAIL 32-bit done/hold");
    end
  endtask

  initial begin
    a16 = 0; b16 = 0; a32 = 0; b32 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_op(16'd3, 16'd5, 32'd7, 32'd9);
    run_op(16'h8000, 16'h8000, 32'h8000_0000, 32'h8000_0000);
    run_op(16'h7FFF, 16'h8000, 32'h7FFF_FFFF, 32'h8000_0000);
    run_op(16'hFFFF, 16'h7FFF, 32'hFFFF_FFFF, 32'h7FFF_FFFF);
    run_op(16'd0, 16'h1234, 32'd0, 32'h1234_5678);
    run_op(16'h5555, 16'h5555, 32'h5555_5555, 32'h5555_5555);  // 3Y digits throughout
    for (int i = 0; i < 1500; i++)
      run_op(16'($urandom), 16'($urandom), $urandom, $urandom);
    checks++;
    if (approx_diff == 0 || trunc_diff == 0) begin
      failures++; $display("FAIL approximation (%0d) or truncation (%0d) never changed a product", approx_diff, trunc_diff);
    end
    $display("approximate 16-bit products differing from a*b: %0d; truncated differing from untruncated: %0d",
             approx_diff, trunc_diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
