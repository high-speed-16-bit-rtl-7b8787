// 16-bit carry bypass (carry-skip) adder with carry look-ahead groups.
// The operands are split into WIDTH/M groups of M bits (bits 0-3, 4-7, 8-11,
// 12-15 by default). Each group is a cba_stage: its carries come from a
// carry look-ahead unit rather than a ripple chain, and a bypass multiplexer
// lets the incoming carry skip the group whenever all of its bits propagate.
// The group carry-outs are chained from bit 0 upward; cout is the carry out of
// the top group. Fully combinational: sum and cout settle one propagation
// delay after a, b or cin change, with no clock and no latency in cycles.
// Group size, group count and the chaining follow the published design; the
// grp_p output (one bypass select per group) is this design's addition for
// observation and may be left open.
module cba16 #(
  parameter int unsigned WIDTH = cba_pkg::ADDER_WIDTH,
  parameter int unsigned M     = cba_pkg::GROUP_WIDTH
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  input  logic               cin,
  output logic [WIDTH-1:0]   sum,
  output logic               cout,
  output logic [WIDTH/M-1:0] grp_p   // per-group bypass select
);
  localparam int unsigned NG = WIDTH / M;

  logic [NG:0] carry;   // carry[k] enters group k, carry[NG] leaves the adder

  assign carry[0] = cin;

  for (genvar k = 0; k < NG; k++) begin : g_stage
    cba_stage #(.M(M)) u_stage (
      .a    (a[k*M +: M]),
      .b    (b[k*M +: M]),
      .cin  (carry[k]),
      .sum  (sum[k*M +: M]),
      .cout (carry[k+1]),
      .grp_p(grp_p[k])
    );
  end

  assign cout = carry[NG];

  initial assert (WIDTH % M == 0) else $error("WIDTH must be a multiple of M");
endmodule
