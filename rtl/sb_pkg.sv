// sb_pkg: types shared by the signed-binary (SB) arithmetic blocks.
//
// A signed-binary digit takes a value in {-1, 0, +1}. It is carried in
// sign-magnitude form as two bits: `magn` is 1 when the digit is non-zero and
// `sign` is 1 when it is negative. The pair sign=1/magn=0 has no meaning of
// its own; it appears when the signs of a whole SB number are inverted and a
// zero digit picks up sign=1. The converter treats it as a zero digit.
//
// PN chips of the scrambler are the values +1/-1; on a wire a chip is one bit
// with 0 standing for +1 and 1 for -1 (this encoding is a choice of this
// design).
package sb_pkg;

  typedef struct packed {
    logic sign;  // 1: digit is negative
    logic magn;  // 1: digit is non-zero
  } sb_digit_t;

  // Wire encoding of a +1/-1 PN chip.
  localparam logic PN_PLUS  = 1'b0;
  localparam logic PN_MINUS = 1'b1;

  // Value of one digit as a small signed integer (used by checks).
  function automatic int signed sb_digit_value(sb_digit_t d);
    return d.magn ? (d.sign ? -1 : 1) : 0;
  endfunction

endpackage
