// dm_pkg: types and small helper functions shared by the decimal multiplier.
//
// A decimal digit is four bits. Operand and product digits are BCD (0-9).
// Intermediate product digits use the overloaded decimal representation:
// the digit position still has weight ten, but the four bits may hold any
// value from 0 to 15, so one number has several digit strings. A carry out
// of a four-bit digit (a value of sixteen) is passed on as a one to the next
// digit and leaves a debt of six in its own digit, which is paid later.
package dm_pkg;

  typedef logic [3:0] digit_t;

  // Value six when the flag is set, else zero.
  function automatic logic [3:0] six_if(input logic f);
    return f ? 4'd6 : 4'd0;
  endfunction

  // BCD digit plus six (6-F), a small two-level function of the digit.
  function automatic logic [3:0] plus6(input logic [3:0] d);
    return d + 4'd6;
  endfunction

  // Bit-level carry-save (3:2) addition of three 4-bit words.
  function automatic logic [7:0] csa4(input logic [3:0] x, input logic [3:0] y,
                                      input logic [3:0] z);
    logic [3:0] s, c;
    s = x ^ y ^ z;
    c = (x & y) | (x & z) | (y & z);
    return {c, s};
  endfunction

  // Split a binary value of at most 63 into a decimal digit and a tens count.
  function automatic logic [6:0] div10(input logic [5:0] v);
    logic [2:0] h;
    logic [3:0] r;
    h = 3'(v / 6'd10);
    r = 4'(v - 6'(h) * 6'd10);
    return {h, r};
  endfunction

endpackage
