// mult_pkg: constants shared by the multiplier blocks.
//
// Delays are counted in half-XOR-gate units so that every delay of the cell
// model is an integer.  The full-adder model follows the usual (3,2) counter
// timing: A or B to Sum costs two XOR delays, Cin to Sum and any input to
// Carry cost one.  The half adder costs one XOR delay to Sum and half an XOR
// delay to Carry.  These numbers drive the wiring choices of the TDM tree
// generator; they do not model any real library.
//
// Follows the lecture: the relative full-adder timing (Cin is the fast
// input).  Own choice: the half-adder figures and the half-XOR unit.
package mult_pkg;

  // Full adder, in half-XOR units
  localparam int unsigned FA_AB_S  = 4;  // A/B -> S : 2 XOR
  localparam int unsigned FA_CI_S  = 2;  // Cin -> S : 1 XOR
  localparam int unsigned FA_ANY_C = 2;  // any -> C : 1 XOR
  // Half adder, in half-XOR units
  localparam int unsigned HA_ANY_S = 2;  // 1 XOR
  localparam int unsigned HA_ANY_C = 1;  // 0.5 XOR

  // Full-adder logic: sum and majority carry
  function automatic logic fa_sum(input logic a, input logic b, input logic c);
    return a ^ b ^ c;
  endfunction

  function automatic logic fa_carry(input logic a, input logic b, input logic c);
    return (a & b) | (a & c) | (b & c);
  endfunction

endpackage
