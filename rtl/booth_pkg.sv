// booth_pkg - types shared by the radix-8 Booth multiplier.
//
// A radix-8 Booth digit lies in -4..+4. It is carried as a struct of a sign
// flag and a magnitude selector (0, Y, 2Y, 3Y, 4Y), which is what the
// partial product generator needs to pick and complement a multiple of the
// multiplicand. The controller's four states (wait for go, initial,
// add-and-shift, done) are the four states of the sequential multiplier.
package booth_pkg;

  // Magnitude of a radix-8 digit: which multiple of Y is selected.
  typedef enum logic [2:0] {
    MAG_0 = 3'd0,
    MAG_1 = 3'd1,
    MAG_2 = 3'd2,
    MAG_3 = 3'd3,
    MAG_4 = 3'd4
  } booth_mag_e;

  typedef struct packed {
    logic       neg;  // 1: subtract the selected multiple
    booth_mag_e mag;
  } booth_digit_t;

  // States of the multiplier controller.
  typedef enum logic [1:0] {
    S_WAIT_GO   = 2'd0,
    S_INIT      = 2'd1,
    S_ADD_SHIFT = 2'd2,
    S_DONE      = 2'd3
  } booth_state_e;

  // Number of radix-8 digits of an n-bit signed multiplier: ceil(n/3).
  function automatic int unsigned booth_digits(int unsigned n);
    return (n + 2) / 3;
  endfunction

endpackage
