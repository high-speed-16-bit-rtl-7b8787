// Shared sizes of the CLA-based carry bypass adder.
// The adder is 16 bits wide and is cut into groups of 4 bits (bits 0-3, 4-7,
// 8-11 and 12-15); each group has its own setup, carry look-ahead, sum and
// bypass logic. Both numbers are those of the published design.
package cba_pkg;
  localparam int unsigned ADDER_WIDTH = 16;  // operand width
  localparam int unsigned GROUP_WIDTH = 4;   // bits per bypass group ("M")
endpackage
