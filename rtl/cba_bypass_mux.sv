// Bypass multiplexer of one carry-bypass group.
// When every bit of the group propagates (grp_p = 1) the carry leaving the
// group equals the carry entering it, so the multiplexer passes the group
// carry-in straight on and the carry skips the group's look-ahead logic;
// otherwise it passes the carry-out computed by the look-ahead unit. A 2:1
// multiplexer, combinational. Its place and role follow the published block
// diagram; the select polarity is the standard carry-skip rule.
module cba_bypass_mux (
  input  logic grp_p,           // group propagate (select)
  input  logic cin,             // carry into the group
  input  logic cla_cout,        // carry-out from the look-ahead unit
  output logic cout             // carry passed to the next group
);
  always_comb cout = grp_p ? cin : cla_cout;
endmodule
