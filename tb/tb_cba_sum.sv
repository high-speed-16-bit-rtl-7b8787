// Self-checking testbench for cba_sum: all 256 combinations of propagate and
// carry bits; each sum bit must be 1 exactly when one of its two inputs is 1.
module tb_cba_sum;
  localparam int unsigned M = 4;
  logic [M-1:0] p, c, s;
  int checks = 0, failures = 0;

  cba_sum #(.M(M)) dut (.p(p), .c(c), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic [M-1:0] exp_s;
      {c, p} = 8'(v);
      #1;
      for (int i = 0; i < M; i++) exp_s[i] = (int'(p[i]) + int'(c[i])) % 2 == 1;
      checks++;
      if (s !== exp_s) begin
        failures++;
        $display("FAIL p=%b c=%b s=%b exp=%b", p, c, s, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
