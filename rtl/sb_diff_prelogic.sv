// sb_diff_prelogic: a, b -> signed-binary number x for the difference branch.
//
// The bit pair (a_i, NOT b_i) is read as the initial-sum digit
// y_i = a_i + ~b_i in {0,1,2} and mapped to x_i = 1 - y_i, so
// magn = XNOR(a_i, ~b_i) = a_i XOR b_i and sign = a_i AND ~b_i. No +1 is
// needed: for unsigned readings a', b' of the operands a' - b' = -T_x(x), so
// the difference branch only inverts the signs of x (a-b) or leaves them
// (-(a-b)). One gate level, no carries.
// Interface: purely combinational, N-bit operands in, N digits out.
//   msb_fix = a_{N-1} XOR b_{N-1}: with D the value of the N digits,
//   -(a-b) = D + 2^N*msb_fix and (a-b) = -D - 2^N*msb_fix, both modulo
//   2^(N+1), which is all the (N+1)-bit result needs (signed operands).
module sb_diff_prelogic
  import sb_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]          a,
  input  logic [N-1:0]          b,
  output sb_digit_t [N-1:0]     x,
  output logic                  msb_fix
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      x[i].sign = a[i] & ~b[i];
      x[i].magn = a[i] ^ b[i];
    end
  end

  assign msb_fix = a[N-1] ^ b[N-1];

endmodule
