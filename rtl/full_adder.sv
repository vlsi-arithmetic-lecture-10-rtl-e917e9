// full_adder: the (3,2) counter, the basic cell of every reduction tree here.
//
// Adds three bits of equal weight and returns a sum bit of the same weight and
// a carry bit of twice the weight.  The inputs are not interchangeable in
// time: in the cell model used for tree wiring, a and b reach s through two
// XOR levels while ci reaches s through one, so a late-arriving signal should
// be wired to ci.  Purely combinational.
//
// Follows the lecture: the full adder as (3,2) counter with a fast carry-in.
// Own choice: the gate form p = a ^ b, s = p ^ ci, co = a&b | p&ci.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;
  assign p  = a ^ b;          // first XOR level
  assign s  = p ^ ci;         // second XOR level (ci enters late)
  assign co = (a & b) | (p & ci);
endmodule
