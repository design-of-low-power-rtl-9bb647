// am_mult4 - accurate part of the 8-bit approximate multiplier: an unsigned
// H x H parallel (array) multiplier, H = 4.
//
// Row i of the array is the AND of x with y[i], shifted left by i; the rows
// are summed by a chain of adders. The design asks only for a standard 4-bit
// parallel multiplier; this row-and-adder structure is the simplest one.
// Purely combinational.
module am_mult4 #(
  parameter int unsigned H = 4
) (
  input  logic [H-1:0]   x,
  input  logic [H-1:0]   y,
  output logic [2*H-1:0] p
);

  always_comb begin
    p = '0;
    for (int i = 0; i < H; i++)
      p = p + (({{H{1'b0}}, x & {H{y[i]}}}) << i);
  end

endmodule
