// sb_cla: carry-lookahead carry network driven through its G-P inputs.
//
// Each position i presents a generate bit g[i] and a propagate bit p[i]; the
// network returns every carry c[i] (c[0] = cin, c[N] = carry out) with
//   c[i+1] = g[i] | p[i] & c[i].
// When a position presents g = p = 1 the propagate wins: the carry is passed
// on and the generate bit has no effect. The signed-binary converter relies
// on this for digits whose sign was inverted while they were zero. It is done
// by masking g with ~p before the prefix tree.
// The carries are computed by a Kogge-Stone parallel-prefix tree of
// ceil(log2(N)) levels; the paper only asks for a carry-lookahead adder,
// the prefix structure is this design's choice.
// Interface: purely combinational.
module sb_cla #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  input  logic         cin,
  output logic [N:0]   c
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;

  // group generate/propagate after each prefix level; level 0 are the inputs
  logic [LEVELS:0][N-1:0] gg;
  logic [LEVELS:0][N-1:0] pp;

  assign gg[0] = g & ~p;
  assign pp[0] = p;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (i >= (1 << l)) begin : g_merge
        assign gg[l+1][i] = gg[l][i] | (pp[l][i] & gg[l][i-(1<<l)]);
        assign pp[l+1][i] = pp[l][i] & pp[l][i-(1<<l)];
      end else begin : g_pass
        assign gg[l+1][i] = gg[l][i];
        assign pp[l+1][i] = pp[l][i];
      end
    end
  end

  assign c = {gg[LEVELS] | (pp[LEVELS] & {N{cin}}), cin};

endmodule
