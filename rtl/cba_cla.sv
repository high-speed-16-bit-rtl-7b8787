// Carry look-ahead unit of one carry-bypass group.
// Every carry of the group is written out as a flat sum of products of the
// group carry-in and the per-bit propagate/generate signals,
//   c[i] = g[i-1] | p[i-1]g[i-2] | ... | p[i-1]..p[1]g[0] | p[i-1]..p[0]cin,
// so no carry has to ripple through the bits before it. c[M] is the
// carry-out of the group; c[0] is the carry-in passed straight
// through, so that the sum stage reads one carry vector. Purely combinational.
// Replacing the ripple-carry chain inside each bypass group by this look-ahead
// logic is the central idea of the published adder; the sum-of-products form
// is the textbook one.
module cba_cla #(
  parameter int unsigned M = cba_pkg::GROUP_WIDTH
) (
  input  logic [M-1:0] p,       // per-bit propagate
  input  logic [M-1:0] g,       // per-bit generate
  input  logic         cin,     // group carry-in
  output logic [M:0]   c        // c[i] = carry into bit i, c[M] = carry-out
);
  always_comb begin
    c = '0;
    for (int unsigned i = 0; i <= M; i++) begin
      logic term;
      // carry-in term: cin propagated through bits 0 .. i-1
      term = cin;
      for (int unsigned k = 0; k < i; k++) term = term & p[k];
      c[i] = term;
      // generate terms: bit j generates and bits j+1 .. i-1 propagate
      for (int unsigned j = 0; j < i; j++) begin
        term = g[j];
        for (int unsigned k = j + 1; k < i; k++) term = term & p[k];
        c[i] = c[i] | term;
      end
    end
  end
endmodule
