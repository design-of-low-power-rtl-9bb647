// recoding_adder - generator of the hard multiple 3Y = Y + 2Y of a radix-8
// Booth multiplier.
//
// Y (N bits, signed) is sign-extended to N+2 bits and added to 2Y. The low
// APPROX_BITS bits of the sum come from a chain of approx_add2 slices, each
// of which cuts the carry chain; the remaining upper bits are an exact adder
// whose carry in is the last approximate slice's carry out. APPROX_BITS = 0
// gives an exact 3Y; an odd value is rounded down to whole 2-bit slices.
// Forming 3Y as Y + 2Y with an approximate 2-bit adder is the multiplier's
// design; how many low bits are approximated (default N/2) is this
// implementation's choice. Purely combinational.
module recoding_adder #(
  parameter int unsigned N           = 16,
  parameter int unsigned APPROX_BITS = N / 2
) (
  input  logic [N-1:0] y,    // signed multiplicand
  output logic [N+1:0] y3    // approximate 3Y, signed
);

  localparam int unsigned W   = N + 2;
  localparam int unsigned NS0 = APPROX_BITS / 2;
  localparam int unsigned NS  = (2 * NS0 > W) ? W / 2 : NS0;  // 2-bit slices
  localparam int unsigned AB  = 2 * NS;                        // approximated bits

  logic [W-1:0] y1x, y2x;
  logic [NS:0]  c;

  assign y1x  = {{2{y[N-1]}}, y};
  assign y2x  = {y1x[W-2:0], 1'b0};
  assign c[0] = 1'b0;

  for (genvar k = 0; k < NS; k++) begin : g_slice
    approx_add2 u_add2 (
      .a   (y1x[2*k +: 2]),
      .b   (y2x[2*k +: 2]),
      .cin (c[k]),
      .s   (y3[2*k +: 2]),
      .cout(c[k+1])
    );
  end

  if (AB < W) begin : g_exact
    assign y3[W-1:AB] = y1x[W-1:AB] + y2x[W-1:AB] + {{(W-AB-1){1'b0}}, c[NS]};
  end

endmodule
