// Self-checking testbench for cba_stage: all 512 combinations of two 4-bit
// operands and the carry-in. {cout, sum} must equal the integer sum
// a + b + cin, and grp_p must be 1 exactly when a + b = 15 (every bit
// position holds one 1, so an incoming carry runs through the whole group).
module tb_cba_stage;
  localparam int unsigned M = 4;
  logic [M-1:0] a, b, sum;
  logic         cin, cout, grp_p;
  int checks = 0, failures = 0;
  int n_bypass = 0;

  cba_stage #(.M(M)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .grp_p(grp_p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int total;
      logic exp_gp;
      {cin, b, a} = 9'(v);
      #1;
      total  = int'(a) + int'(b) + int'(cin);
      exp_gp = (int'(a) + int'(b) == 15) && ((a & b) == '0);
      if (exp_gp) n_bypass++;
      checks++;
      if ({cout, sum} !== 5'(total) || grp_p !== exp_gp) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b -> cout=%b sum=%h P=%b, exp %0d P=%b",
                 a, b, cin, cout, sum, grp_p, total, exp_gp);
      end
    end
    checks++;
    if (n_bypass != 32) begin
      failures++;
      $display("FAIL bypass cases %0d, expected 32", n_bypass);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
