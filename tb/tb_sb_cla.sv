// tb_sb_cla: self-check of the carry-lookahead carry network.
//
// The default 8-bit network is driven with every combination of g, p and cin
// (2^17 vectors); a 13-bit instance (width not a power of two) gets random
// vectors. Every carry is compared with a bit-serial reference in which a
// position with p = 1 passes its incoming carry on whatever g is, and a
// position with p = 0 outputs g. One vector per clock cycle.
module tb_sb_cla;

  localparam int unsigned N  = 8;
  localparam int unsigned N2 = 13;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]  g, p;
  logic          cin;
  logic [N:0]    c;
  logic [N2-1:0] g2, p2;
  logic          cin2;
  logic [N2:0]   c2;

  int checks = 0;
  int failures = 0;

  sb_cla dut (.g(g), .p(p), .cin(cin), .c(c));
  sb_cla #(.N(N2)) dut2 (.g(g2), .p(p2), .cin(cin2), .c(c2));

  function automatic logic [N2:0] ripple(input logic [N2-1:0] gi, input logic [N2-1:0] pi,
                                         input logic ci, input int w);
    logic [N2:0] r = '0;
    r[0] = ci;
    for (int i = 0; i < w; i++) r[i+1] = pi[i] ? r[i] : gi[i];
    return r;
  endfunction

  initial begin
    logic [N2:0] e;
    for (int v = 0; v < (1 << (2*N+1)); v++) begin
      {cin, g, p} = (2*N+1)'(v);
      g2 = N2'($urandom); p2 = N2'($urandom); cin2 = 1'($urandom);
      @(posedge clk);
      e = ripple(N2'(g), N2'(p), cin, N);
      checks++;
      if (c !== e[N:0]) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 g=%b p=%b cin=%b c=%b exp=%b", g, p, cin, c, e[N:0]);
      end
      e = ripple(g2, p2, cin2, N2);
      checks++;
      if (c2 !== e) begin
        failures++;
        if (failures < 10) $display("FAIL N=13 g=%b p=%b cin=%b c=%b exp=%b", g2, p2, cin2, c2, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (140000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
