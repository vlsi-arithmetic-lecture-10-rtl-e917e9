// compressor_4_2: 4:2 compressor, two full adders in series.
//
// Adds four bits x1..x4 of weight 1 and a lateral carry-in ci (from the
// compressor one bit position lower) and returns sum (weight 1), carry
// (weight 2) and a lateral carry-out co (weight 2, to the next position):
//   x1 + x2 + x3 + x4 + ci = sum + 2*(carry + co).
// co depends only on x1..x3, never on ci, so a row of these compressors has
// no carry ripple: a row turns four operand rows into two in the time of two
// full adders.  The first adder takes x1..x3; the second takes its sum, x4 and
// ci, with ci on the fast carry-in input.  Purely combinational.
//
// Follows the lecture: the 4:2 compressor as two full adders with one lateral
// carry in and out, and its two full-adder levels.  Own choice: which inputs
// go to which adder port.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic ci,
  output logic sum,
  output logic carry,
  output logic co
);
  logic s1;
  full_adder u_fa1 (.a(x1), .b(x2), .ci(x3), .s(s1),  .co(co));
  full_adder u_fa2 (.a(s1), .b(x4), .ci(ci), .s(sum), .co(carry));
endmodule
