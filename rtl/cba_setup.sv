// Setup stage of one carry-bypass group.
// For every bit of the group it forms the propagate signal p = a XOR b and the
// generate signal g = a AND b, and it reduces the propagates to the group
// propagate P = p[0] & ... & p[M-1], which steers the bypass multiplexer.
// Purely combinational: one XOR or AND level for p and g, then an M-input AND.
// The setup block and its place before the look-ahead logic follow the
// published block diagram; the XOR/AND definitions are the usual ones for
// propagate and generate (the text calls the propagate "the XOR operation of
// the inputs").
module cba_setup #(
  parameter int unsigned M = cba_pkg::GROUP_WIDTH
) (
  input  logic [M-1:0] a,       // operand bits of this group
  input  logic [M-1:0] b,
  output logic [M-1:0] p,       // per-bit propagate
  output logic [M-1:0] g,       // per-bit generate
  output logic         grp_p    // group propagate: all bits propagate
);
  always_comb begin
    p     = a ^ b;
    g     = a & b;
    grp_p = &p;
  end
endmodule
