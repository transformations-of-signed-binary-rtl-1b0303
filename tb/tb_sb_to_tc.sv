// tb_sb_to_tc: self-check of the signed-binary to two's-complement converter.
//
// Random N-digit SB numbers are applied, including zero digits that carry a
// sign bit of 1 (the pair that appears after a sign inversion), together with
// every value of inv and msb_fix. With D the value of the digits (zero digits
// count 0 whatever their sign) the expected result is
//   r = ((inv ? -D : D) mod 2^(N+1)) XOR (msb_fix << N).
// The numeric example's digit string (-132 = T_x(x)+1 of a=-101, b=-23) is
// also converted both ways and compared with its worked results.
// One vector per clock cycle.
module tb_sb_to_tc;
  import sb_pkg::*;

  localparam int unsigned N = 8;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  sb_digit_t [N-1:0] d;
  logic              inv, msb_fix;
  logic [N:0]        r;

  int checks = 0;
  int failures = 0;
  int forbidden_seen = 0;

  sb_to_tc dut (.d(d), .inv(inv), .msb_fix(msb_fix), .r(r));

  task automatic check_vec();
    int v = 0;
    logic [N:0] e;
    for (int i = 0; i < N; i++) begin
      v += sb_digit_value(d[i]) * (1 << i);
      if (!d[i].magn && (d[i].sign ^ inv)) forbidden_seen++;
    end
    if (inv) v = -v;
    e = (N+1)'(v) ^ {msb_fix, {N{1'b0}}};
    checks++;
    if (r !== e) begin
      failures++;
      if (failures < 10) $display("FAIL d=%b inv=%b fix=%b r=%b exp=%b", d, inv, msb_fix, r, e);
    end
  endtask

  initial begin
    // example I: digits -1 at positions 7 and 2 (value -132)
    for (int i = 0; i < N; i++) d[i] = '{sign: 1'b0, magn: 1'b0};
    d[7] = '{sign: 1'b1, magn: 1'b1};
    d[2] = '{sign: 1'b1, magn: 1'b1};
    msb_fix = 1'b1;                      // both operands negative
    inv = 1'b1;  @(posedge clk);         // a+b = -124
    checks++; if (r !== 9'b110000100) begin failures++; $display("FAIL example a+b r=%b", r); end
    inv = 1'b0;  @(posedge clk);         // -(a+b) = 124
    checks++; if (r !== 9'b001111100) begin failures++; $display("FAIL example -(a+b) r=%b", r); end
    for (int n = 0; n < 100000; n++) begin
      d = (2*N)'($urandom);
      inv = 1'($urandom);
      msb_fix = 1'($urandom);
      @(posedge clk);
      check_vec();
    end
    checks++;
    if (forbidden_seen == 0) begin failures++; $display("FAIL sign-inverted zero digit never applied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (110000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
