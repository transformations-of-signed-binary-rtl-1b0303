// tb_sb_sum_prelogic: exhaustive self-check of the sum-branch prelogic.
//
// For every pair of 8-bit operands the N output digits D must satisfy
//   -(a+b) = D + 2^N * msb_fix        (a, b signed)
// and must never use the sign=1/magn=0 pair. The expected digit of each
// position is also rebuilt independently from the carry-free +1 rule
// (x_i = 1 - a_i - b_i, t_1 = [x_0 >= 0], t_i = [x_{i-1} = +1]). The two
// operand pairs of the numeric examples (-101, -23) and (-82, 62) are checked
// against their hand-worked digit strings. One operand pair per clock cycle.
module tb_sb_sum_prelogic;
  import sb_pkg::*;

  localparam int unsigned N = 8;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]      a, b;
  sb_digit_t [N-1:0] d;
  logic              msb_fix;

  int checks = 0;
  int failures = 0;

  sb_sum_prelogic dut (.a(a), .b(b), .d(d), .msb_fix(msb_fix));

  function automatic int digits_value(sb_digit_t [N-1:0] v);
    int s = 0;
    for (int i = 0; i < N; i++) s += sb_digit_value(v[i]) * (1 << i);
    return s;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d b=%0d", what, $signed(a), $signed(b));
    end
  endtask

  task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb);
    int sa, sb_, x[N], t, ref_d;
    a = ta; b = tb;
    @(posedge clk);
    sa = int'($signed(ta)); sb_ = int'($signed(tb));
    check(-(sa + sb_) == digits_value(d) + (1 << N) * int'(msb_fix), "value");
    for (int i = 0; i < N; i++) begin
      x[i] = 1 - int'(ta[i]) - int'(tb[i]);
      check(!(d[i].sign && !d[i].magn), "forbidden pair");
    end
    for (int i = 0; i < N; i++) begin
      if (i == 0) ref_d = (x[0] == 0) ? -1 : 0;
      else begin
        t = (i == 1) ? int'(x[0] >= 0) : int'(x[i-1] == 1);
        ref_d = ((x[i] != 0) ? -1 : 0) + t;
      end
      check(sb_digit_value(d[i]) == ref_d, "digit");
    end
  endtask

  function automatic logic [N-1:0] pack_sign(sb_digit_t [N-1:0] v);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = v[i].sign;
    return r;
  endfunction
  function automatic logic [N-1:0] pack_magn(sb_digit_t [N-1:0] v);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = v[i].magn;
    return r;
  endfunction

  initial begin
    // numeric example I: a = -101, b = -23
    apply(8'b10011011, 8'b11101001);
    check(pack_sign(d) == 8'b10000100 && pack_magn(d) == 8'b10000100, "example I digits");
    // numeric example II: a = -82, b = 62
    apply(8'b10101110, 8'b00111110);
    check(pack_sign(d) == 8'b01101100 && pack_magn(d) == 8'b11101100, "example II digits");
    for (int ia = 0; ia < (1 << N); ia++)
      for (int ib = 0; ib < (1 << N); ib++)
        apply(N'(ia), N'(ib));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
