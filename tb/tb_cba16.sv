// End-to-end self-checking testbench for the 16-bit carry bypass adder cba16,
// run with the top's default parameters (16 bits, groups of 4).
// Every result is compared with the integer sum a + b + cin formed in the
// testbench, and each per-group bypass select with a reference worked out from
// the operands (a group bypasses when its operand bits are complementary).
// Stimulus: directed corner cases, operand pairs that are nearly complementary
// (so that many groups bypass at once) and uniformly random pairs.
// Mechanisms counted, each of which must occur at least once:
//   - bypass in group k with a carry of 1 arriving, i.e. a carry actually
//     skipped across group k (for every k);
//   - a carry generated in group 0 that skips all three upper groups to cout;
//   - a group carry-out produced by the look-ahead unit (group not bypassed);
//   - an overflow (cout = 1).
// The adder is combinational, so each vector is checked 1 time unit after it
// is applied; there is no cycle latency to check.
module tb_cba16;
  localparam int unsigned WIDTH = 16;
  localparam int unsigned M     = 4;
  localparam int unsigned NG    = WIDTH / M;
  localparam int unsigned NRAND = 20000;

  logic [WIDTH-1:0] a, b, sum;
  logic             cin, cout;
  logic [NG-1:0]    grp_p;

  int checks = 0, failures = 0;
  int n_skip[NG];
  int n_long_skip = 0, n_cla_carry = 0, n_overflow = 0;

  cba16 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .grp_p(grp_p));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // carry entering bit position `pos`, computed with integer arithmetic
  function automatic bit carry_into(int pos, logic [WIDTH-1:0] x, logic [WIDTH-1:0] y, logic ci);
    longint mask, s;
    mask = (longint'(1) << pos) - 1;
    s = (longint'(x) & mask) + (longint'(y) & mask) + longint'(ci);
    return ((s >> pos) & 1) == 1;
  endfunction

  task automatic apply(input logic [WIDTH-1:0] va, input logic [WIDTH-1:0] vb, input logic vc);
    longint total;
    logic [NG-1:0] exp_gp;
    bit            cin_k, cout_k;
    a = va; b = vb; cin = vc;
    #1;
    total = longint'(a) + longint'(b) + longint'(cin);
    checks++;
    if ({cout, sum} !== (WIDTH+1)'(total)) begin
      failures++;
      $display("FAIL %h + %h + %b = %b_%h, expected %0h", a, b, cin, cout, sum, total);
    end
    for (int k = 0; k < NG; k++) begin
      exp_gp[k] = ((a[k*M +: M] ^ b[k*M +: M]) == {M{1'b1}});
      cin_k  = carry_into(k*M, a, b, cin);
      cout_k = carry_into((k+1)*M, a, b, cin);
      if (exp_gp[k] && cin_k) n_skip[k]++;
      if (!exp_gp[k] && cout_k) n_cla_carry++;
    end
    checks++;
    if (grp_p !== exp_gp) begin
      failures++;
      $display("FAIL bypass selects %b, expected %b for %h + %h", grp_p, exp_gp, a, b);
    end
    if (exp_gp[NG-1:1] == '1 && !exp_gp[0] && carry_into(M, a, b, cin)) n_long_skip++;
    if (total >> WIDTH != 0) n_overflow++;
  endtask

  initial begin
    logic [WIDTH-1:0] ra, rb;
    foreach (n_skip[k]) n_skip[k] = 0;

    // directed corners
    apply('0, '0, 1'b0);
    apply('0, '1, 1'b0);
    apply('0, '1, 1'b1);          // carry-in skips every group
    apply('1, '1, 1'b1);
    apply(16'h0001, 16'hFFFF, 1'b0);
    apply(16'h000F, 16'hFFF1, 1'b0); // generated in group 0, skips groups 1-3
    apply(16'h5555, 16'hAAAA, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);

    // nearly complementary operands: many groups bypass together
    for (int i = 0; i < NRAND; i++) begin
      ra = WIDTH'($urandom);
      rb = ~ra;
      for (int k = 0; k < NG; k++)
        if ($urandom_range(0, 2) == 0) rb[k*M + $urandom_range(0, M-1)] ^= 1'b1;
      apply(ra, rb, 1'($urandom));
    end

    // uniformly random operands
    for (int i = 0; i < NRAND; i++) apply(WIDTH'($urandom), WIDTH'($urandom), 1'($urandom));

    for (int k = 0; k < NG; k++) begin
      $display("carry skipped across group %0d: %0d times", k, n_skip[k]);
      checks++;
      if (n_skip[k] == 0) begin failures++; $display("FAIL no skip across group %0d", k); end
    end
    $display("carry from group 0 skipped to cout: %0d, look-ahead group carries: %0d, overflows: %0d",
             n_long_skip, n_cla_carry, n_overflow);
    checks++; if (n_long_skip == 0) begin failures++; $display("FAIL no long skip"); end
    checks++; if (n_cla_carry == 0) begin failures++; $display("FAIL no look-ahead carry"); end
    checks++; if (n_overflow  == 0) begin failures++; $display("FAIL no overflow"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
