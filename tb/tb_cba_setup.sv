// Self-checking testbench for cba_setup: applies all 256 pairs of 4-bit
// operands and compares p, g and the group propagate with values formed bit
// by bit in the testbench (p = 1 when exactly one operand bit is 1, g = 1 when
// both are; group propagate = 1 when no bit position holds equal bits).
module tb_cba_setup;
  localparam int unsigned M = 4;
  logic [M-1:0] a, b, p, g;
  logic         grp_p;
  int checks = 0, failures = 0;

  cba_setup #(.M(M)) dut (.a(a), .b(b), .p(p), .g(g), .grp_p(grp_p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 16; ia++) begin
      for (int ib = 0; ib < 16; ib++) begin
        logic [M-1:0] exp_p, exp_g;
        logic         exp_gp;
        a = M'(ia); b = M'(ib);
        #1;
        exp_gp = 1'b1;
        for (int i = 0; i < M; i++) begin
          exp_p[i] = (a[i] != b[i]);
          exp_g[i] = (a[i] == 1'b1) && (b[i] == 1'b1);
          if (a[i] == b[i]) exp_gp = 1'b0;
        end
        checks++;
        if (p !== exp_p || g !== exp_g || grp_p !== exp_gp) begin
          failures++;
          $display("FAIL a=%h b=%h p=%h/%h g=%h/%h P=%b/%b", a, b, p, exp_p, g, exp_g, grp_p, exp_gp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
