// am_ctrl - control block of the 8-bit approximate multiplier.
//
// One H-input NOR gate on the high nibble of A, one on the high nibble of B,
// and a NAND of the two: ctrl = 1 when either high nibble holds a 1. Then
// the operands are large enough for the split mode, where the high product
// byte is computed accurately and the low byte approximately. ctrl = 0 means
// both high nibbles are zero and the low nibbles are multiplied exactly.
// The gate structure follows the design; purely combinational.
module am_ctrl #(
  parameter int unsigned H = 4
) (
  input  logic [H-1:0] a_hi,   // A7-A4
  input  logic [H-1:0] b_hi,   // B7-B4
  output logic         ctrl
);

  logic nor_a, nor_b;

  assign nor_a = ~|a_hi;
  assign nor_b = ~|b_hi;
  assign ctrl  = ~(nor_a & nor_b);

endmodule
