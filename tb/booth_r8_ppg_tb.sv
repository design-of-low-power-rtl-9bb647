// booth_r8_ppg_tb - checks the partial product generator (N = 16).
// With no truncation, pp + cin read as a signed N+4-bit value must equal
// d*Y for every digit d in -4..+4 (3Y supplied exactly). With a random
// truncation mask, the kept bits must match the selected multiple (inverted
// for negative digits), the dropped bits must be 0, and cin must follow
// keep_cin.
module booth_r8_ppg_tb;
  import booth_pkg::*;
  localparam int N = 16;
  logic [N-1:0]  y;
  logic [N+1:0]  y3;
  booth_digit_t  digit;
  logic [N+3:0]  mask, pp;
  logic          keep_cin, cin;
  int checks = 0, failures = 0;

  booth_r8_ppg #(.N(N)) dut (.y, .y3, .digit, .trunc_mask(mask), .keep_cin, .pp, .cin);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      longint yv, m, expect_v, got_v;
      logic [N+3:0] sel_bits;
      int d, cut;
      y  = (i < 2) ? (i == 0 ? 16'h8000 : 16'h7FFF) : 16'($urandom);
      yv = longint'($signed(y));
      y3 = 18'(3 * yv);
      for (d = -4; d <= 4; d++) begin
        digit.neg = (d < 0);
        digit.mag = booth_mag_e'(d < 0 ? -d : d);
        // exact
        mask = '1; keep_cin = 1'b1;
        #1;
        expect_v = longint'(d) * yv;
        got_v    = longint'($signed(pp)) + longint'(cin);
        checks++;
        if (got_v != expect_v) begin
          failures++; $display("FAIL y=%0d d=%0d got %0d", yv, d, got_v);
        end
        // truncated
        cut  = int'($urandom_range(0, N));
        mask = {(N+4){1'b1}} << cut;
        keep_cin = (cut == 0);
        #1;
        m = longint'(d < 0 ? -d : d) * yv;
        sel_bits = (d < 0) ? ~(N+4)'(m) : (N+4)'(m);
        checks++;
        if (pp !== (sel_bits & mask) || cin !== ((d < 0) && keep_cin)) begin
          failures++; $display("FAIL trunc y=%0d d=%0d cut=%0d", yv, d, cut);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
