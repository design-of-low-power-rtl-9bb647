// booth_r8_encoder - radix-8 Booth recoder.
//
// Takes a quartet of multiplier bits, {x[3j+2], x[3j+1], x[3j], x[3j-1]},
// and returns the digit d = -4*x[3j+2] + 2*x[3j+1] + x[3j] + x[3j-1] as a
// sign and a magnitude selector. The table is the standard radix-8 recoding
// (0000 -> 0, 0001/0010 -> +Y, ..., 0111 -> +4Y, 1000 -> -4Y, ...,
// 1111 -> 0). Both all-zero and all-one quartets give a zero digit with the
// sign cleared, so a zero digit never contributes a two's-complement +1.
// Purely combinational.
module booth_r8_encoder
  import booth_pkg::*;
(
  input  logic [3:0]   quartet,
  output booth_digit_t digit
);

  always_comb begin
    unique case (quartet)
      4'b0000: digit = '{neg: 1'b0, mag: MAG_0};
      4'b0001: digit = '{neg: 1'b0, mag: MAG_1};
      4'b0010: digit = '{neg: 1'b0, mag: MAG_1};
      4'b0011: digit = '{neg: 1'b0, mag: MAG_2};
      4'b0100: digit = '{neg: 1'b0, mag: MAG_2};
      4'b0101: digit = '{neg: 1'b0, mag: MAG_3};
      4'b0110: digit = '{neg: 1'b0, mag: MAG_3};
      4'b0111: digit = '{neg: 1'b0, mag: MAG_4};
      4'b1000: digit = '{neg: 1'b1, mag: MAG_4};
      4'b1001: digit = '{neg: 1'b1, mag: MAG_3};
      4'b1010: digit = '{neg: 1'b1, mag: MAG_3};
      4'b1011: digit = '{neg: 1'b1, mag: MAG_2};
      4'b1100: digit = '{neg: 1'b1, mag: MAG_2};
      4'b1101: digit = '{neg: 1'b1, mag: MAG_1};
      4'b1110: digit = '{neg: 1'b1, mag: MAG_1};
      default: digit = '{neg: 1'b0, mag: MAG_0};  // 1111
    endcase
  end

endmodule
