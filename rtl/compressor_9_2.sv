// compressor_9_2: 9:2 compressor of seven full adders in four levels.
//
// Adds nine bits x[8:0] of weight 1 and six lateral carries ci[5:0] from the
// compressor one position lower, and returns sum (weight 1), carry (weight 2)
// and six lateral carries co[5:0] (weight 2) for the position above:
//   sum(x) + sum(ci) = sum + 2*(carry + sum(co)).
// Level 1: three adders on x[8:0].  Level 2: one adder on the three level-1
// sums, one on ci[2:0].  Level 3: one adder on the two level-2 sums and ci[3].
// Level 4: one adder on the level-3 sum, ci[4] and ci[5].  co[j] comes from a
// level strictly below the level where ci[j] is used in the next position, so
// the lateral carries never ripple and a row of these compressors takes four
// full-adder levels (seven adders = 9 + 6 inputs minus 2 + 6 outputs).
// Purely combinational, no clock.
//
// Follows the lecture: the port counts (9 in, 6 lateral carries each way) and
// the four full-adder levels of the 9:2 entry in its compressor table.
// Own choices: the exact grouping of adders, and placing the latest-arriving
// signal on the fast carry-in in levels 3 and 4.  That brings the longest
// path to 7 XOR delays (8 with the inputs in plain order); the lecture's
// optimised gate-level cell reaches 6, which this adder-level form does not.
module compressor_9_2 (
  input  logic [8:0] x,
  input  logic [5:0] ci,
  output logic       sum,
  output logic       carry,
  output logic [5:0] co
);
  logic [2:0] s_l1;
  logic       s_l2a, s_l2b, s_l3;

  // Level 1
  full_adder u_fa0 (.a(x[0]), .b(x[1]), .ci(x[2]), .s(s_l1[0]), .co(co[0]));
  full_adder u_fa1 (.a(x[3]), .b(x[4]), .ci(x[5]), .s(s_l1[1]), .co(co[1]));
  full_adder u_fa2 (.a(x[6]), .b(x[7]), .ci(x[8]), .s(s_l1[2]), .co(co[2]));
  // Level 2
  full_adder u_fa3 (.a(s_l1[0]), .b(s_l1[1]), .ci(s_l1[2]), .s(s_l2a), .co(co[3]));
  full_adder u_fa4 (.a(ci[0]),   .b(ci[1]),   .ci(ci[2]),   .s(s_l2b), .co(co[4]));
  // Level 3
  full_adder u_fa5 (.a(s_l2b), .b(ci[3]), .ci(s_l2a), .s(s_l3), .co(co[5]));
  // Level 4
  full_adder u_fa6 (.a(ci[4]), .b(ci[5]), .ci(s_l3), .s(sum), .co(carry));
endmodule
