// booth_fsm - controller of the sequential radix-8 Booth multiplier.
//
// Four states, as in the multiplier's design:
//   WAIT_GO   idle; waits for go (operands ready)
//   INIT      one cycle: the datapath loads its operand registers, appends
//             the 0 below the multiplier LSB and sign-extends it
//   ADD_SHIFT DIGITS cycles: each adds one partial product and shifts the
//             accumulator right by 3 in the same cycle; step counts 0..DIGITS-1
//   DONE      one cycle: done = 1, the product is complete; back to WAIT_GO
// busy is 1 in every state but WAIT_GO. A go seen while busy is ignored.
// Reset is asynchronous and active low (this implementation's choice).
module booth_fsm
  import booth_pkg::*;
#(
  parameter int unsigned DIGITS = 6,
  localparam int unsigned SW    = (DIGITS > 1) ? $clog2(DIGITS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          go,
  output logic          load,
  output logic          add_shift,
  output logic [SW-1:0] step,
  output logic          done,
  output logic          busy
);

  booth_state_e state, state_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_WAIT_GO;
      step  <= '0;
    end else begin
      state <= state_n;
      if (state == S_ADD_SHIFT) step <= step + 1'b1;
      else                      step <= '0;
    end
  end

  always_comb begin
    state_n = state;
    unique case (state)
      S_WAIT_GO:   if (go) state_n = S_INIT;
      S_INIT:      state_n = S_ADD_SHIFT;
      S_ADD_SHIFT: if (step == SW'(DIGITS - 1)) state_n = S_DONE;
      S_DONE:      state_n = S_WAIT_GO;
      default:     state_n = S_WAIT_GO;
    endcase
  end

  assign load      = (state == S_INIT);
  assign add_shift = (state == S_ADD_SHIFT);
  assign done      = (state == S_DONE);
  assign busy      = (state != S_WAIT_GO);

endmodule
