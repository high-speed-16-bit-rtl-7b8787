// Self-checking testbench for cba_bypass_mux: all eight input combinations.
// With the group propagating the carry-in must pass; otherwise the look-ahead
// carry-out must pass.
module tb_cba_bypass_mux;
  logic grp_p, cin, cla_cout, cout;
  int checks = 0, failures = 0;

  cba_bypass_mux dut (.grp_p(grp_p), .cin(cin), .cla_cout(cla_cout), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_cout;
      {grp_p, cin, cla_cout} = 3'(v);
      #1;
      if (grp_p) exp_cout = cin;
      else       exp_cout = cla_cout;
      checks++;
      if (cout !== exp_cout) begin
        failures++;
        $display("FAIL P=%b cin=%b cla=%b cout=%b exp=%b", grp_p, cin, cla_cout, cout, exp_cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
