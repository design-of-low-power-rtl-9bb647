// approx_booth_top_tb - end-to-end test of the top at its default parameters.
//
// Runs operations on the 16-bit and the 32-bit Booth multipliers at the same
// time, overlapped with different start cycles, and applies operand pairs to
// the 8-bit approximate multiplier. Every result is compared with an integer
// model; the Booth latencies (8 and 13 cycles from go to done) are checked.
// It counts and requires each mechanism at least once: a +-3Y digit (the
// hard multiple), a negative digit (inversion plus carry-in), a 3Y whose
// carry cut changed the product, a go ignored while busy, and both modes of
// the 8-bit multiplier (exact low nibbles and split accurate/approximate).
module approx_booth_top_tb;
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

  int checks = 0, failures = 0;
  int n_digit3 = 0, n_neg = 0, n_approx = 0, n_go_ignored = 0, n_am_exact = 0, n_am_split = 0;

  approx_booth_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void count_digits(longint b, int n);
    int prev = 0;
    for (int j = 0; j < (n + 2) / 3; j++) begin
      int d = -4 * int'((b >>> (3 * j + 2)) & 1) + 2 * int'((b >>> (3 * j + 1)) & 1)
              + int'((b >>> (3 * j)) & 1) + prev;
      prev = int'((b >>> (3 * j + 2)) & 1);
      if (d == 3 || d == -3) n_digit3++;
      if (d < 0) n_neg++;
    end
  endfunction

  // One operation on one Booth multiplier, started at the next negedge;
  // a second go pulse is sent while it is busy and must be ignored.
  task automatic op16(logic [15:0] x, logic [15:0] y);
    longint sx = longint'($signed(x)), sy = longint'($signed(y)), m;
    int cyc = 0;
    @(negedge clk); a16 = x; b16 = y; go16 = 1;
    @(negedge clk); go16 = 0;
    // cyc counts clock edges since the one that saw go: INIT is 1, DONE is 8
    cyc = 1;
    while (!done16 && cyc < 30) begin
      @(negedge clk);
      cyc++;
      go16 = (cyc == 4);  // a go while busy, which must be ignored
      if (cyc == 4) begin n_go_ignored++; a16 = ~x; end
    end
    go16 = 0;
    m = booth_model(sx, sy, 16, 8, 0);
    count_digits(sy, 16);
    if (m != sx * sy) n_approx++;
    checks += 2;
    if (cyc != 8) begin failures++; $display("FAIL 16-bit latency %0d", cyc); end
    if (longint'($signed(p16)) != m) begin
      failures++; $display("FAIL p16 %0d*%0d got %0d expect %0d", sx, sy, $signed(p16), m);
    end
    @(negedge clk);
    checks++;
    if (busy16) begin failures++; $display("FAIL ignored go restarted the 16-bit multiplier"); end
  endtask

  task automatic op32(logic [31:0] x, logic [31:0] y);
    longint sx = longint'($signed(x)), sy = longint'($signed(y)), m;
    int cyc = 0;
    @(negedge clk); a32 = x; b32 = y; go32 = 1;
    @(negedge clk); go32 = 0;
    cyc = 1;
    while (!done32 && cyc < 30) begin
      @(negedge clk);
      cyc++;
    end
    m = booth_model(sx, sy, 32, 16, 0);
    count_digits(sy, 32);
    if (m != sx * sy) n_approx++;
    checks += 2;
    if (cyc != 13) begin failures++; $display("FAIL 32-bit latency %0d", cyc); end
    if (longint'(p32) != m) begin
      failures++; $display("FAIL p32 %0d*%0d got %0d expect %0d", sx, sy, longint'(p32), m);
    end
  endtask

  task automatic op8(logic [7:0] x, logic [7:0] y);
    logic [15:0] expect_p;
    logic [7:0]  lo = 8'd0;
    am_a = x; am_b = y;
    #1;
    if (x[7:4] == 0 && y[7:4] == 0) begin
      expect_p = 16'(int'(x) * int'(y));
      n_am_exact++;
    end else begin
      for (int i = 3; i >= 0; i--)
        if (x[i] || y[i]) begin lo = 8'((16'd1 << (i + 5)) - 1); break; end
      expect_p = {8'(int'(x[7:4]) * int'(y[7:4])), lo};
      n_am_split++;
    end
    checks++;
    if (am_p !== expect_p) begin
      failures++; $display("FAIL am8 %0d*%0d got %h expect %h", x, y, am_p, expect_p);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    op8(8'd230, 8'd50);
    op8(8'd9, 8'd13);
    fork
      begin
        op16(16'h5555, 16'h5555);
        op16(16'h8000, 16'h7FFF);
        for (int i = 0; i < 600; i++) op16(16'($urandom), 16'($urandom));
      end
      begin
        repeat (3) @(negedge clk);
        op32(32'h5555_5555, 32'h5555_5555);
        op32(32'h8000_0000, 32'h8000_0000);
        for (int i = 0; i < 400; i++) op32($urandom, $urandom);
      end
      begin
        for (int i = 0; i < 3000; i++) begin
          @(negedge clk);
          op8(8'($urandom), (i % 4 == 0) ? 8'($urandom_range(0, 15)) : 8'($urandom));
          if (i % 4 == 0) op8(8'($urandom_range(0, 15)), 8'($urandom_range(0, 15)));
        end
      end
    join
    $display("mechanisms: 3Y digits=%0d negative digits=%0d approximate products=%0d go ignored=%0d am8 exact=%0d split=%0d",
             n_digit3, n_neg, n_approx, n_go_ignored, n_am_exact, n_am_split);
    checks++;
    if (n_digit3 == 0 || n_neg == 0 || n_approx == 0 || n_go_ignored == 0 || n_am_exact == 0 || n_am_split == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
