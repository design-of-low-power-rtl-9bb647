// am_apg - approximate part of the 8-bit approximate multiplier.
//
// No partial products and no carries: the low nibbles are scanned from the
// MSB down, and at the first position i where either operand has a 1, product
// bit i+H and every product bit to its right are set to 1. If both low
// nibbles are zero the result is zero. In effect p_lo is a thermometer code
// of the leading one of (a_lo | b_lo), extended by H ones below it.
// Example: a_lo = 0110, b_lo = 0010 -> leading one at bit 2 -> 0111_1111.
// The rule follows the design; mapping operand bit i to product bit i+H is
// the reading that reproduces its worked example. Purely combinational.
module am_apg #(
  parameter int unsigned H = 4
) (
  input  logic [H-1:0]   a_lo,   // A3-A0
  input  logic [H-1:0]   b_lo,   // B3-B0
  output logic [2*H-1:0] p_lo    // approximate P7-P0
);

  logic [H-1:0] any_one;   // bit i: a 1 at position i or above

  always_comb begin
    any_one[H-1] = a_lo[H-1] | b_lo[H-1];
    for (int i = H - 2; i >= 0; i--)
      any_one[i] = any_one[i+1] | a_lo[i] | b_lo[i];
  end

  assign p_lo = {any_one, {H{any_one[0]}}};

endmodule
