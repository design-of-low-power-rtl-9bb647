// approx_booth_top - the two approximate radix-8 Booth multipliers, 16-bit and
// 32-bit signed, and, beside them, the 8-bit approximate multiplier with an
// accurate high part and an approximate low part.
//
// The three units are independent: the Booth multipliers share only clock
// and reset, each has its own go/done handshake (see booth_r8_mult: latency
// 8 cycles for 16 bits, 13 for 32 bits), and the 8-bit multiplier is purely
// combinational. The approximation and truncation settings of each Booth
// multiplier are parameters; their defaults (low half of 3Y approximate, no
// truncation) are this implementation's choice.
module approx_booth_top #(
  parameter int unsigned APPROX_16 = 8,
  parameter int unsigned TRUNC_16  = 0,
  parameter int unsigned APPROX_32 = 16,
  parameter int unsigned TRUNC_32  = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  // 16-bit signed Booth multiplier
  input  logic        go16,
  input  logic [15:0] a16,
  input  logic [15:0] b16,
  output logic [31:0] p16,
  output logic        done16,
  output logic        busy16,
  // 32-bit signed Booth multiplier
  input  logic        go32,
  input  logic [31:0] a32,
  input  logic [31:0] b32,
  output logic [63:0] p32,
  output logic        done32,
  output logic        busy32,
  // 8-bit unsigned approximate multiplier
  input  logic [7:0]  am_a,
  input  logic [7:0]  am_b,
  output logic [15:0] am_p
);

  booth_r8_mult #(.N(16), .APPROX_BITS(APPROX_16), .TRUNC_BITS(TRUNC_16)) u_mult16 (
    .clk, .rst_n, .go(go16), .a(a16), .b(b16), .p(p16), .done(done16), .busy(busy16)
  );

  booth_r8_mult #(.N(32), .APPROX_BITS(APPROX_32), .TRUNC_BITS(TRUNC_32)) u_mult32 (
    .clk, .rst_n, .go(go32), .a(a32), .b(b32), .p(p32), .done(done32), .busy(busy32)
  );

  approx_mult8 #(.H(4)) u_am8 (
    .a(am_a), .b(am_b), .p(am_p)
  );

endmodule
