// Sum stage of one carry-bypass group: s[i] = p[i] XOR c[i], where p is the
// per-bit propagate from the setup stage and c the carry into each bit from
// the look-ahead unit. One XOR level, combinational. The block is the "Sum"
// box of the published block diagram; the XOR is the standard sum equation.
module cba_sum #(
  parameter int unsigned M = cba_pkg::GROUP_WIDTH
) (
  input  logic [M-1:0] p,       // per-bit propagate
  input  logic [M-1:0] c,       // carry into each bit
  output logic [M-1:0] s        // sum bits
);
  always_comb s = p ^ c;
endmodule
