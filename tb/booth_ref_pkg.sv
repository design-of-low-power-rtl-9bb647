// booth_ref_pkg - integer reference models used by the testbenches.
//
// y3_model:    3Y as formed by a chain of approximate 2-bit slices over the
//              low `ab` bits (each slice's carry out ignores its carry in),
//              with an exact sum above them.
// booth_model: the product a*b summed digit by digit in integer arithmetic,
//              with 3Y taken from y3_model and partial-product bits below
//              product column `t` dropped (truncation), the +1 of a negative
//              digit dropped when its column is below `t`.
// Both work on signed values of up to 32 bits held in longint.
package booth_ref_pkg;

  function automatic longint y3_model(longint y, int n, int ab);
    int          w = n + 2;
    int          slices;
    logic [63:0] y1, y2, res, hi, wmask;
    int          c, s, aa, bb;
    slices = ab / 2;
    if (2 * slices > w) slices = w / 2;
    wmask  = (64'd1 << w) - 1;
    y1     = 64'(y) & wmask;
    y2     = (y1 << 1) & wmask;
    res    = '0;
    c      = 0;
    for (int k = 0; k < slices; k++) begin
      aa  = int'((y1 >> (2 * k)) & 3);
      bb  = int'((y2 >> (2 * k)) & 3);
      s   = aa + bb + c;
      res = res | (64'(s & 3) << (2 * k));
      c   = (aa + bb) >> 2;
    end
    if (2 * slices < w) begin
      hi  = (y1 >> (2 * slices)) + (y2 >> (2 * slices)) + 64'(c);
      res = res | (hi << (2 * slices));
    end
    res = res & wmask;
    // sign-extend from w bits
    if (res[w-1]) res = res | ~wmask;
    return longint'(res);
  endfunction

  function automatic longint booth_model(longint a, longint b, int n, int ab, int t);
    int     digits = (n + 2) / 3;
    longint y3     = y3_model(a, n, ab);
    longint acc    = 0;
    longint m, v, mask;
    int     prev   = 0;
    int     b0, b1, b2, d, cut;
    for (int j = 0; j < digits; j++) begin
      b0 = int'((b >>> (3 * j)) & 1);
      b1 = int'((b >>> (3 * j + 1)) & 1);
      b2 = int'((b >>> (3 * j + 2)) & 1);
      d  = -4 * b2 + 2 * b1 + b0 + prev;
      prev = b2;
      case (d < 0 ? -d : d)
        0: m = 0;
        1: m = a;
        2: m = 2 * a;
        3: m = y3;
        default: m = 4 * a;
      endcase
      cut  = t - 3 * j;
      mask = (cut > 0) ? ~((longint'(1) << cut) - 1) : -1;
      v    = ((d < 0) ? ~m : m) & mask;
      if (d < 0 && cut <= 0) v = v + 1;
      acc  = acc + (v <<< (3 * j));
    end
    return acc;
  endfunction

endpackage
