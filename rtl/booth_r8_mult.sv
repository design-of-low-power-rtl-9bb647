// booth_r8_mult - sequential signed N x N approximate radix-8 Booth multiplier.
//
// The multiplier X is recoded three bits at a time into ceil(N/3) radix-8
// digits in -4..+4, so only ceil(N/3) partial products are summed instead of
// N. Every multiple is a shift of the multiplicand Y except 3Y, which is
// formed once per operation as Y + 2Y by the approximate recoding adder.
//
// One digit is handled per clock: in ADD_SHIFT the partial product is added
// to the upper half of a {acc_hi, acc_lo} register and the whole register is
// shifted right arithmetically by 3 in the same cycle. acc_lo starts out
// holding X (sign-extended to 3*ceil(N/3) bits); its three low bits and the
// bit shifted out before them form the quartet of the next digit, and as X
// is shifted out the finished product bits are shifted in from above.
//
// Interface and timing: go is seen in WAIT_GO; a and b are sampled in the
// following INIT cycle; then ceil(N/3) ADD_SHIFT cycles follow and done is
// 1 for one cycle in DONE. p is the low 2N bits of the accumulator: valid
// from done until the next INIT, changing while busy. Latency from go to
// done is ceil(N/3) + 2 cycles (8 for N = 16, 13 for N = 32).
//
// From the multiplier's design: radix-8 recoding, 3Y = Y + 2Y with an
// approximate 2-bit adder, two's complement as inversion plus a carry-in in
// the accumulation adder, an FSM with four states, add and shift in one
// cycle, and optional truncation of partial-product LSBs. This
// implementation's choices: APPROX_BITS (low bits of 3Y that are
// approximate, default N/2) and TRUNC_BITS (product columns below which all
// partial-product bits, and the +1 of any digit at those columns, are
// dropped; default 0, no truncation).
module booth_r8_mult
  import booth_pkg::*;
#(
  parameter int unsigned N           = 16,
  parameter int unsigned APPROX_BITS = N / 2,
  parameter int unsigned TRUNC_BITS  = 0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           go,
  input  logic [N-1:0]   a,      // multiplicand Y, signed
  input  logic [N-1:0]   b,      // multiplier X, signed
  output logic [2*N-1:0] p,      // product, signed
  output logic           done,
  output logic           busy
);

  localparam int unsigned D  = booth_digits(N);      // digits / ADD_SHIFT cycles
  localparam int unsigned XW = 3 * D;                 // sign-extended multiplier
  localparam int unsigned PW = N + 4;                 // partial product width
  localparam int unsigned SW = (D > 1) ? $clog2(D) : 1;

  logic          load, add_shift;
  logic [SW-1:0] step;

  logic [N-1:0]  y_q;        // multiplicand register
  logic [PW-1:0] acc_hi;     // running sum, aligned to the current digit
  logic [XW-1:0] acc_lo;     // remaining multiplier bits / finished product bits
  logic          x_m1;       // multiplier bit below the current quartet

  logic [N+1:0]  y3;
  booth_digit_t  digit;
  logic [PW-1:0] pp, trunc_mask, sum;
  logic          pp_cin, keep_cin;
  logic [PW+XW-1:0] shifted;

  booth_fsm #(.DIGITS(D)) u_fsm (
    .clk, .rst_n, .go,
    .load, .add_shift, .step, .done, .busy
  );

  recoding_adder #(.N(N), .APPROX_BITS(APPROX_BITS)) u_y3 (
    .y (y_q),
    .y3(y3)
  );

  booth_r8_encoder u_enc (
    .quartet({acc_lo[2:0], x_m1}),
    .digit  (digit)
  );

  // Truncation: digit `step` is added at product column 3*step, so its bits
  // below column TRUNC_BITS are the low (TRUNC_BITS - 3*step) bits.
  always_comb begin
    int cut;
    cut = int'(TRUNC_BITS) - 3 * int'(step);
    if (cut <= 0)            trunc_mask = '1;
    else if (cut >= int'(PW)) trunc_mask = '0;
    else                     trunc_mask = {PW{1'b1}} << cut;
    keep_cin = (cut <= 0);
  end

  booth_r8_ppg #(.N(N)) u_ppg (
    .y         (y_q),
    .y3        (y3),
    .digit     (digit),
    .trunc_mask(trunc_mask),
    .keep_cin  (keep_cin),
    .pp        (pp),
    .cin       (pp_cin)
  );

  always_comb begin
    sum     = acc_hi + pp + {{(PW-1){1'b0}}, pp_cin};
    shifted = {{3{sum[PW-1]}}, sum, acc_lo[XW-1:3]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q    <= '0;
      acc_hi <= '0;
      acc_lo <= '0;
      x_m1   <= 1'b0;
    end else if (load) begin
      y_q    <= a;
      acc_hi <= '0;
      acc_lo <= {{(XW-N){b[N-1]}}, b};
      x_m1   <= 1'b0;
    end else if (add_shift) begin
      {acc_hi, acc_lo} <= shifted;
      x_m1             <= acc_lo[2];
    end
  end

  assign p = {acc_hi, acc_lo}[2*N-1:0];

endmodule
