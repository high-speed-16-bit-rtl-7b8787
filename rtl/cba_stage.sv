// One M-bit stage of the CLA-based carry bypass adder.
// Setup forms p, g and the group propagate; the look-ahead unit computes every
// carry of the group from p, g and cin; the sum stage XORs p with those
// carries; the bypass multiplexer sends cin straight to cout when the whole
// group propagates, and the look-ahead carry-out otherwise. All combinational:
// the worst path into sum is setup + look-ahead + XOR, and a carry that
// crosses a fully propagating group sees only one multiplexer.
// Ports a, b, cin, sum and cout carry the names of the published 4-bit unit;
// grp_p is brought out so that a chain of stages can be observed.
module cba_stage #(
  parameter int unsigned M = cba_pkg::GROUP_WIDTH
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         cin,
  output logic [M-1:0] sum,
  output logic         cout,
  output logic         grp_p    // 1 when the carry bypasses this stage
);
  logic [M-1:0] p, g;
  logic [M:0]   c;

  cba_setup #(.M(M)) u_setup (.a(a), .b(b), .p(p), .g(g), .grp_p(grp_p));
  cba_cla   #(.M(M)) u_cla   (.p(p), .g(g), .cin(cin), .c(c));
  cba_sum   #(.M(M)) u_sum   (.p(p), .c(c[M-1:0]), .s(sum));
  cba_bypass_mux     u_mux   (.grp_p(grp_p), .cin(cin), .cla_cout(c[M]), .cout(cout));
endmodule
