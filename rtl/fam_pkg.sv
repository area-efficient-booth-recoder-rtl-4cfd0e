// fam_pkg: types and helpers shared by the fused add-multiply (FAM) unit.
//
// A radix-4 Modified Booth (MB) digit takes a value in {-2,-1,0,+1,+2}. It is
// carried between the recoder, the partial product generator and the
// correction-term block as three wires: a sign flag `neg` and a one-hot
// magnitude (`one` for |d| = 1, `two` for |d| = 2). Zero is all three low, and
// `neg` is never set for a zero digit. This encoding is a choice of this
// design; the selection it drives (X or 2X, inverted when negative) is the
// usual MB partial product selection.
package fam_pkg;

  typedef struct packed {
    logic neg;  // digit is negative
    logic one;  // |digit| == 1
    logic two;  // |digit| == 2
  } mb_digit_t;

  // Digit from the three S-MB1 bits of one slice:
  //   d = -2*n + s + c, with n the negatively weighted odd bit and s, c the
  //   two positively weighted bits of weight one. Range -2..+2.
  function automatic mb_digit_t mb_encode(input logic n, input logic s, input logic c);
    mb_digit_t d;
    d.one = s ^ c;
    d.two = (s & c & ~n) | (~s & ~c & n);
    d.neg = n & ~(s & c);
    return d;
  endfunction

  // Signed value of a digit (used by checkers and testbenches).
  function automatic int mb_value(input mb_digit_t d);
    int m;
    m = d.two ? 2 : (d.one ? 1 : 0);
    return d.neg ? -m : m;
  endfunction

endpackage
