// tb_pn_scrambler: end-to-end self-check of the complex +-1 multiplier at its
// default size (8-bit operands, 9-bit outputs).
//
// Every pair (a, b) of 8-bit operands is applied with each of the four PN
// codes, one vector per clock cycle (262144 vectors). The outputs are compared
// with A + jB = (a + jb)(PN_re + jPN_im) computed with integers, taken modulo
// 2^9 so that the single out-of-range case, -(a+b) = +256 for a = b = -128,
// is expected to wrap to -256. The numeric examples (a, b) = (-101, -23) and
// (-82, 62) are also checked against their worked results +-124, +-78, +-20
// and +-144.
// Each mechanism of the design is counted and must occur at least once: each
// PN code, sign inversion on and off in each branch, both output routings,
// a zero digit reaching a converter with an inverted sign (G-P = 11), the
// sign-bit correction (msb_fix) in each branch and the wrapped overflow.
module tb_pn_scrambler;
  import sb_pkg::*;

  localparam int unsigned N = 8;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] a, b;
  logic         pn_re, pn_im;
  logic [N:0]   out_re, out_im;

  int checks = 0;
  int failures = 0;

  int n_code[4];
  int n_sum_inv, n_sum_noinv, n_diff_inv, n_diff_noinv;
  int n_route_straight, n_route_swapped;
  int n_gp11_sum, n_gp11_diff, n_fix_sum, n_fix_diff, n_overflow;

  pn_scrambler dut (
    .a(a), .b(b), .pn_re(pn_re), .pn_im(pn_im),
    .out_re(out_re), .out_im(out_im)
  );

  function automatic int chip(input logic c);
    return (c == PN_MINUS) ? -1 : 1;
  endfunction

  task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb_, input logic pr,
                       input logic pi);
    int sa, sb_, er, ei;
    a = ta; b = tb_; pn_re = pr; pn_im = pi;
    @(posedge clk);
    sa = int'($signed(ta)); sb_ = int'($signed(tb_));
    er = sa * chip(pr) - sb_ * chip(pi);
    ei = sa * chip(pi) + sb_ * chip(pr);
    checks++;
    if (out_re !== (N+1)'(er) || out_im !== (N+1)'(ei)) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%0d b=%0d pn=(%0d,%0d) got (%0d,%0d) exp (%0d,%0d)", sa, sb_,
                 chip(pr), chip(pi), $signed(out_re), $signed(out_im), er, ei);
    end
    n_code[{pr, pi}]++;
    if (pr == PN_PLUS) n_sum_inv++;  else n_sum_noinv++;
    if (pi == PN_PLUS) n_diff_inv++; else n_diff_noinv++;
    if (pr == pi) n_route_straight++; else n_route_swapped++;
    if ((dut.u_sum_conv.g & dut.u_sum_conv.p) != '0)   n_gp11_sum++;
    if ((dut.u_diff_conv.g & dut.u_diff_conv.p) != '0) n_gp11_diff++;
    if (dut.sum_fix)  n_fix_sum++;
    if (dut.diff_fix) n_fix_diff++;
    if (er > (1 << N) - 1 || ei > (1 << N) - 1) n_overflow++;
  endtask

  // expected (A, B) for the worked examples, one PN code at a time
  task automatic example(input int sa, input int sb_, input logic pr, input logic pi,
                         input int er, input int ei);
    apply(N'(sa), N'(sb_), pr, pi);
    checks++;
    if (int'($signed(out_re)) != er || int'($signed(out_im)) != ei) begin
      failures++;
      $display("FAIL example a=%0d b=%0d got (%0d,%0d) exp (%0d,%0d)", sa, sb_,
               $signed(out_re), $signed(out_im), er, ei);
    end
  endtask

  task automatic require(input int count, input string what);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    example(-101, -23, PN_PLUS,  PN_PLUS,  -78, -124);   //  a-b,     a+b
    example(-101, -23, PN_PLUS,  PN_MINUS, -124, 78);    //  a+b,   -(a-b)
    example(-101, -23, PN_MINUS, PN_PLUS,  124, -78);    // -(a+b),   a-b
    example(-101, -23, PN_MINUS, PN_MINUS, 78, 124);     // -(a-b), -(a+b)
    example(-82, 62, PN_PLUS,  PN_PLUS,  -144, -20);
    example(-82, 62, PN_PLUS,  PN_MINUS, -20, 144);
    example(-82, 62, PN_MINUS, PN_PLUS,  20, -144);
    example(-82, 62, PN_MINUS, PN_MINUS, 144, 20);
    for (int code = 0; code < 4; code++)
      for (int ia = 0; ia < (1 << N); ia++)
        for (int ib = 0; ib < (1 << N); ib++)
          apply(N'(ia), N'(ib), code[1], code[0]);
    $display("mechanism counts:");
    require(n_code[0], "PN code (+1,+1)");
    require(n_code[1], "PN code (+1,-1)");
    require(n_code[2], "PN code (-1,+1)");
    require(n_code[3], "PN code (-1,-1)");
    require(n_sum_inv, "sum branch signs inverted");
    require(n_sum_noinv, "sum branch signs kept");
    require(n_diff_inv, "diff branch signs inverted");
    require(n_diff_noinv, "diff branch signs kept");
    require(n_route_straight, "sum routed to B");
    require(n_route_swapped, "sum routed to A");
    require(n_gp11_sum, "G-P pair 11 in sum converter");
    require(n_gp11_diff, "G-P pair 11 in diff converter");
    require(n_fix_sum, "sign-bit correction, sum");
    require(n_fix_diff, "sign-bit correction, diff");
    require(n_overflow, "-(a+b) = +2^N wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
