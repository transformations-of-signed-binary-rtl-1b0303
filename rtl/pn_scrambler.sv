// pn_scrambler: complex +-1 multiplier for a CDMA pseudonoise (PN) scrambler.
//
// Computes A + jB = (a + jb) * (PN_re + jPN_im) for N-bit two's-complement
// a, b and PN chips in {+1, -1}. Each output is one of (a+b), -(a+b), (a-b),
// -(a-b):
//     PN_re PN_im |    A        B
//      +1    +1   |  a-b      a+b
//      +1    -1   |  a+b    -(a-b)
//      -1    +1   | -(a+b)    a-b
//      -1    -1   | -(a-b)  -(a+b)
// For every code exactly one sum function and one difference function is
// needed, so the circuit has two branches and no multiplier:
//   sum branch : sb_sum_prelogic forms T_x(x)+1 straight from a and b;
//                sb_to_tc inverts the digit signs when PN_re = +1, giving
//                a+b, and leaves them for -(a+b).
//   diff branch: sb_diff_prelogic forms x from a and NOT b; sb_to_tc inverts
//                the signs when PN_im = +1, giving a-b, else -(a-b).
// The PN code only switches the digit signs (one XOR per digit ahead of each
// adder) and the final routing: the sum goes to B when PN_re = PN_im and to A
// otherwise. There is one carry-propagate adder per branch.
// Interface: purely combinational. PN chips are one bit each, 0 = +1 and
// 1 = -1. Outputs are (N+1)-bit two's complement. The one result outside that
// range, -(a+b) = +2^N for a = b = -2^(N-1), wraps to -2^N.
// The two-branch structure, the prelogic of each branch and the PN-controlled
// sign inversion follow the paper. The PN wire encoding, the output
// multiplexers and the absence of registers are this design's choices (the
// paper describes no clocking; registers belong to the surrounding receiver).
module pn_scrambler
  import sb_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,       // real part of the input chip
  input  logic [N-1:0] b,       // imaginary part of the input chip
  input  logic         pn_re,   // real PN chip, 0 = +1, 1 = -1
  input  logic         pn_im,   // imaginary PN chip, 0 = +1, 1 = -1
  output logic [N:0]   out_re,  // A
  output logic [N:0]   out_im   // B
);

  sb_digit_t [N-1:0] sum_d, diff_d;
  logic              sum_fix, diff_fix;
  logic [N:0]        sum_r, diff_r;

  sb_sum_prelogic #(.N(N)) u_sum_pre (
    .a       (a),
    .b       (b),
    .d       (sum_d),
    .msb_fix (sum_fix)
  );

  sb_diff_prelogic #(.N(N)) u_diff_pre (
    .a       (a),
    .b       (b),
    .x       (diff_d),
    .msb_fix (diff_fix)
  );

  // sign inversion selects a+b (PN_re = +1) or -(a+b)
  sb_to_tc #(.N(N)) u_sum_conv (
    .d       (sum_d),
    .inv     (pn_re == PN_PLUS),
    .msb_fix (sum_fix),
    .r       (sum_r)
  );

  // sign inversion selects a-b (PN_im = +1) or -(a-b)
  sb_to_tc #(.N(N)) u_diff_conv (
    .d       (diff_d),
    .inv     (pn_im == PN_PLUS),
    .msb_fix (diff_fix),
    .r       (diff_r)
  );

  always_comb begin
    if (pn_re == pn_im) begin
      out_re = diff_r;
      out_im = sum_r;
    end else begin
      out_re = sum_r;
      out_im = diff_r;
    end
  end

endmodule
