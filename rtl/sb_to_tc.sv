// sb_to_tc: signed-binary -> two's-complement converter of one branch.
//
// Input is an N-digit SB number D (sign-magnitude digits) and the control
// `inv`. When `inv` is 1 the signs of all digits are inverted, which turns D
// into -D without any carry. Each digit is then read back as an initial-sum
// digit y_i = 1 - D_i in {0,1,2} and handed to the carry-lookahead adder as
//   G_i = sign_i   (y_i = 2: generate)
//   P_i = ~magn_i  (y_i = 1: propagate)
// so a zero digit whose sign was inverted (sign=1, magn=0) becomes G-P = 11,
// which the CLA treats as a plain propagate. The adder forms
// Y = sum y_i 2^i = 2^N - 1 - D; inverting its N sum bits gives D mod 2^N,
// the low N bits of the result.
// Sign bit N: the adder's carry out is 1 exactly when D < 0, i.e. it is bit N
// of D as an (N+1)-bit number. The operand sign bits, weighted -2^(N-1),
// shift the true result by a multiple of 2^N; `msb_fix` (from the prelogic)
// says whether that multiple is odd, so
//   r[N] = carry_out XOR msb_fix.
// This plays the role of the paper's eq. (11) (sign bit formed like the
// carry c_N inside the adder); expressing it as carry out XOR a sign-bit term
// is this design's own formulation.
// Interface: purely combinational; r is an (N+1)-bit two's-complement number.
module sb_to_tc
  import sb_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  sb_digit_t [N-1:0] d,
  input  logic              inv,
  input  logic              msb_fix,
  output logic [N:0]        r
);

  logic [N-1:0] g, p, y;
  logic [N:0]   c;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      g[i] = d[i].sign ^ inv;
      p[i] = ~d[i].magn;
    end
  end

  sb_cla #(.N(N)) u_cla (
    .g   (g),
    .p   (p),
    .cin (1'b0),
    .c   (c)
  );

  assign y = p ^ c[N-1:0];        // CLA sum bits
  assign r = {c[N] ^ msb_fix, ~y};

endmodule
