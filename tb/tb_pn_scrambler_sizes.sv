// tb_pn_scrambler_sizes: checks the complex +-1 multiplier at other operand
// widths than the default. N = 4 and N = 5 are run exhaustively (all operand
// pairs, all four PN codes); N = 16 and N = 31 get random operands, with the
// extreme values -2^(N-1) and 2^(N-1)-1 forced in every 8th vector.
// Reference: A + jB = (a + jb)(PN_re + jPN_im) in integers, modulo 2^(N+1).
// One vector per clock cycle for all instances together.
module tb_pn_scrambler_sizes;
  import sb_pkg::*;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [3:0]  a4, b4;   logic [4:0]  r4, i4;
  logic [4:0]  a5, b5;   logic [5:0]  r5, i5;
  logic [15:0] a16, b16; logic [16:0] r16, i16;
  logic [30:0] a31, b31; logic [31:0] r31, i31;
  logic        pr, pi;

  pn_scrambler #(.N(4))  d4  (.a(a4),  .b(b4),  .pn_re(pr), .pn_im(pi), .out_re(r4),  .out_im(i4));
  pn_scrambler #(.N(5))  d5  (.a(a5),  .b(b5),  .pn_re(pr), .pn_im(pi), .out_re(r5),  .out_im(i5));
  pn_scrambler #(.N(16)) d16 (.a(a16), .b(b16), .pn_re(pr), .pn_im(pi), .out_re(r16), .out_im(i16));
  pn_scrambler #(.N(31)) d31 (.a(a31), .b(b31), .pn_re(pr), .pn_im(pi), .out_re(r31), .out_im(i31));

  function automatic longint chip(input logic c);
    return (c == PN_MINUS) ? -1 : 1;
  endfunction

  // compares one instance; w = N+1 bits of output
  task automatic cmp(input longint sa, input longint sb_, input logic [31:0] gr,
                     input logic [31:0] gi, input int w);
    longint er, ei;
    logic [31:0] mask;
    mask = (w >= 32) ? 32'hFFFF_FFFF : ((32'd1 << w) - 1);
    er = sa * chip(pr) - sb_ * chip(pi);
    ei = sa * chip(pi) + sb_ * chip(pr);
    checks++;
    if ((gr & mask) !== (er[31:0] & mask) || (gi & mask) !== (ei[31:0] & mask)) begin
      failures++;
      if (failures < 10) $display("FAIL w=%0d a=%0d b=%0d pn=%b%b", w, sa, sb_, pr, pi);
    end
  endtask

  function automatic logic [30:0] pick31(input int n);
    if (n % 8 == 0) return 31'h4000_0000;
    if (n % 8 == 1) return 31'h3FFF_FFFF;
    return 31'($urandom);
  endfunction

  initial begin
    for (int code = 0; code < 4; code++)
      for (int v = 0; v < 1024; v++) begin
        {pr, pi} = 2'(code);
        a4 = 4'(v >> 4); b4 = 4'(v);
        a5 = 5'(v >> 5); b5 = 5'(v);
        a16 = (v % 8 == 2) ? 16'h8000 : 16'($urandom);
        b16 = (v % 8 == 3) ? 16'h8000 : (v % 8 == 2) ? 16'h8000 : 16'($urandom);
        a31 = pick31(v); b31 = pick31(v + 7 * (v % 2));
        @(posedge clk);
        if (v < 256) cmp(longint'($signed(a4)), longint'($signed(b4)), 32'(r4), 32'(i4), 5);
        cmp(longint'($signed(a5)), longint'($signed(b5)), 32'(r5), 32'(i5), 6);
        cmp(longint'($signed(a16)), longint'($signed(b16)), 32'(r16), 32'(i16), 17);
        cmp(longint'($signed(a31)), longint'($signed(b31)), r31, i31, 32);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
