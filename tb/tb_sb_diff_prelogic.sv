// tb_sb_diff_prelogic: exhaustive self-check of the difference-branch prelogic.
//
// For every pair of 8-bit operands the N digits D must satisfy
//   -(a-b) = D + 2^N * msb_fix  (mod 2^(N+1); a, b signed)
// and every digit must equal 1 - a_i - (1 - b_i). The numeric example
// (-101, -23) is checked against its hand-worked sign and magnitude strings.
// One operand pair per clock cycle.
module tb_sb_diff_prelogic;
  import sb_pkg::*;

  localparam int unsigned N = 8;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]      a, b;
  sb_digit_t [N-1:0] x;
  logic              msb_fix;

  int checks = 0;
  int failures = 0;

  sb_diff_prelogic dut (.a(a), .b(b), .x(x), .msb_fix(msb_fix));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d b=%0d", what, $signed(a), $signed(b));
    end
  endtask

  task automatic apply(input logic [N-1:0] ta, input logic [N-1:0] tb);
    int v = 0;
    a = ta; b = tb;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      check(sb_digit_value(x[i]) == 1 - int'(ta[i]) - (1 - int'(tb[i])), "digit");
      check(!(x[i].sign && !x[i].magn), "forbidden pair");
      v += sb_digit_value(x[i]) * (1 << i);
    end
    check((N+1)'(-($signed(ta) - $signed(tb))) == (N+1)'(v + (1 << N) * int'(msb_fix)), "value");
  endtask

  initial begin
    logic [N-1:0] s, m;
    // numeric example I: a = -101, b = -23
    apply(8'b10011011, 8'b11101001);
    for (int i = 0; i < N; i++) begin s[i] = x[i].sign; m[i] = x[i].magn; end
    check(s == 8'b00010010 && m == 8'b01110010, "example I digits");
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
