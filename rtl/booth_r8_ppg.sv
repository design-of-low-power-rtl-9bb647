// booth_r8_ppg - radix-8 partial product generator.
//
// Selects 0, Y, 2Y, 3Y or 4Y according to the digit's magnitude, each
// sign-extended to PW = N+4 bits (4Y of an N-bit signed Y needs N+3). The
// easy multiples are shifts of Y; 3Y comes from the recoding adder. For a
// negative digit the selected multiple is inverted bit by bit, and the +1
// that completes the two's complement is returned as cin, to be added as the
// carry in of the accumulation adder.
//
// Truncation: bits where trunc_mask is 0 are forced to 0 after the
// inversion, and keep_cin = 0 drops the +1 (its column is then truncated
// too). With an all-ones mask and keep_cin = 1 the partial product is exact.
// Purely combinational.
module booth_r8_ppg
  import booth_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   y,           // signed multiplicand
  input  logic [N+1:0]   y3,          // 3Y from the recoding adder
  input  booth_digit_t   digit,
  input  logic [N+3:0]   trunc_mask,  // 1 = keep the bit
  input  logic           keep_cin,
  output logic [N+3:0]   pp,          // one's complement form when negative
  output logic           cin          // +1 of the two's complement
);

  localparam int unsigned PW = N + 4;

  logic [PW-1:0] y1x, sel;

  assign y1x = {{4{y[N-1]}}, y};

  always_comb begin
    unique case (digit.mag)
      MAG_1:   sel = y1x;
      MAG_2:   sel = y1x << 1;
      MAG_3:   sel = {{2{y3[N+1]}}, y3};
      MAG_4:   sel = y1x << 2;
      default: sel = '0;
    endcase
    pp  = (digit.neg ? ~sel : sel) & trunc_mask;
    cin = digit.neg & keep_cin;
  end

endmodule
