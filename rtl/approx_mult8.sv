// approx_mult8 - 8-bit unsigned approximate multiplier built from an accurate
// high part and an approximate low part.
//
// The operands are split into 4-bit halves. The control block sets ctrl when
// either high half is non-zero. Then the 4 x 4 parallel multiplier forms
// A_hi x B_hi as the product's high byte (P15-P8) and the approximate
// product generator fills the low byte (P7-P0) from the low halves, with no
// carries into the high byte and no cross terms A_hi x B_lo, A_lo x B_hi.
// When ctrl is 0 both high halves are zero, and the multiplexer routes the
// low halves through the same 4 x 4 multiplier, which then gives the exact
// product in P7-P0. Fig 1-style example: 230 x 50 -> 0x2A7F (42*256 + 127).
// Structure and behaviour follow the design; purely combinational.
module approx_mult8 #(
  parameter int unsigned H = 4
) (
  input  logic [2*H-1:0] a,
  input  logic [2*H-1:0] b,
  output logic [4*H-1:0] p
);

  logic           ctrl;
  logic [H-1:0]   mx, my;
  logic [2*H-1:0] acc_p, apx_p;

  am_ctrl #(.H(H)) u_ctrl (
    .a_hi(a[2*H-1:H]),
    .b_hi(b[2*H-1:H]),
    .ctrl(ctrl)
  );

  // Input multiplexer of the accurate part.
  assign mx = ctrl ? a[2*H-1:H] : a[H-1:0];
  assign my = ctrl ? b[2*H-1:H] : b[H-1:0];

  am_mult4 #(.H(H)) u_acc (
    .x(mx),
    .y(my),
    .p(acc_p)
  );

  am_apg #(.H(H)) u_apg (
    .a_lo(a[H-1:0]),
    .b_lo(b[H-1:0]),
    .p_lo(apx_p)
  );

  assign p = ctrl ? {acc_p, apx_p} : {{(2*H){1'b0}}, acc_p};

endmodule
