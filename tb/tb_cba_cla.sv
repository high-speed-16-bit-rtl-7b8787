// Self-checking testbench for cba_cla: applies every combination of the four
// propagate bits, four generate bits and the carry-in (512 cases) and compares
// all five carries with a reference that ripples the carry bit by bit,
// c[i+1] = g[i] | (p[i] & c[i]). The look-ahead unit must give the same
// carries without the ripple.
module tb_cba_cla;
  localparam int unsigned M = 4;
  logic [M-1:0] p, g;
  logic         cin;
  logic [M:0]   c;
  int checks = 0, failures = 0;

  cba_cla #(.M(M)) dut (.p(p), .g(g), .cin(cin), .c(c));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [M:0] exp_c;
      {cin, g, p} = 9'(v);
      #1;
      exp_c[0] = cin;
      for (int i = 0; i < M; i++) exp_c[i+1] = g[i] | (p[i] & exp_c[i]);
      checks++;
      if (c !== exp_c) begin
        failures++;
        $display("FAIL p=%b g=%b cin=%b c=%b exp=%b", p, g, cin, c, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
