// sb_sum_prelogic: a, b -> signed-binary number T_x(x)+1 (sum branch prelogic).
//
// The bit pair (a_i, b_i) is read as the initial-sum digit y_i = a_i + b_i in
// {0,1,2} and mapped to the SB digit x_i = 1 - y_i in {+1,0,-1}. In
// sign-magnitude form x_i has magn = XNOR(a_i, b_i) and sign = a_i AND b_i.
// The +1 that the sum functions need is added here without a carry chain:
//   digit 0 : x_0 + 1 = 2*t_1 + d_0, t_1 = (x_0 >= 0), d_0 = -1 when x_0 = 0
//   digit i : every x_{i-1} = +1 is replaced by a carry t_i = 1 and a digit -1,
//             so d_i = w_i + t_i, with w_i = -1 when x_i != 0 and w_i = 0 else.
// Each output digit is therefore two gate levels deep in a and b. These are
// the paper's equations (4)-(6). Digit N (the carry out of digit N-1) is not
// produced: the sign bit of the final result is set from the operand sign
// bits instead, and `msb_fix` carries what the converter needs for that.
//
// For unsigned readings a', b' of the operands:
//   a' + b' = 2^N - 1 - T_x(x),   so  T_x(x) + 1 = 2^N - (a' + b').
// Interface: purely combinational, N-bit operands in, N digits out.
//   msb_fix = a_{N-1} AND b_{N-1}: with D the value of the N output digits,
//   -(a+b) = D + 2^N*msb_fix and (a+b) = -D - 2^N*msb_fix (signed operands).
module sb_sum_prelogic
  import sb_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]          a,
  input  logic [N-1:0]          b,
  output sb_digit_t [N-1:0]     d,        // T_x(x)+1, digits 0..N-1
  output logic                  msb_fix
);

  logic [N-1:0] m1;    // magnitude of x_i: x_i != 0
  logic [N-1:0] pos1;  // x_i == +1, i.e. a_i = b_i = 0

  assign m1   = ~(a ^ b);
  assign pos1 = ~(a | b);

  always_comb begin
    // digit 0 takes the +1: it is -1 exactly when x_0 = 0
    d[0].sign = a[0] ^ b[0];
    d[0].magn = a[0] ^ b[0];
    for (int unsigned i = 1; i < N; i++) begin
      // carry into digit i: digit 1 receives (x_0 >= 0), higher digits (x_{i-1} = +1)
      logic t;
      t = (i == 1) ? ~(a[0] & b[0]) : pos1[i-1];
      d[i].sign = m1[i] & ~t;
      d[i].magn = m1[i] ^ t;
    end
  end

  assign msb_fix = a[N-1] & b[N-1];

endmodule
