// tdm_multiplier: N x N unsigned parallel multiply-add, P = X * Y + Z, built
// by the Three-Dimensional Method.
//
// Three stages, all combinational:
//   1. pp_array forms the N*N partial-product bits x_j & y_i.
//   2. tdm_tree reduces them, together with the 2N-bit addend Z, to two rows.
//      The addend bits enter the column lists like any other signal that is
//      ready at time zero, so the tree places them where it has slack and the
//      addition costs little or no extra delay: multiply-add in the time of a
//      multiply.  Z = 0 gives a plain product.
//   3. hybrid_final_adder adds the two rows: ripple carry on the early
//      low-order bits [0, S1), one-level carry skip on the late middle bits
//      [S1, S2), carry select on the early high-order bits [S2, 2N+1).
// The result has 2N+1 bits so that X * Y + Z never overflows.
// The default cut points (a third and two thirds of the width) put the
// carry-skip region on the plateau of the arrival profile of the default
// 24-bit tree; they are this design's choice, as are the block size and the
// 2N+1-bit result.
module tdm_multiplier #(
  parameter int unsigned N    = 24,
  parameter int unsigned S1   = (2*N + 1) / 3,
  parameter int unsigned S2   = 2 * (2*N + 1) / 3,
  parameter int unsigned SKIP = 4
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  input  logic [2*N-1:0] z,
  output logic [2*N:0]   p
);
  localparam int unsigned W = 2*N + 1;

  logic [N*N-1:0] pp;
  logic [W-1:0]   row_a, row_b;
  logic           co_unused;

  pp_array #(.N(N)) u_pp (.x(x), .y(y), .pp(pp));

  tdm_tree #(.N(N), .ADDEND(1'b1)) u_tree (
    .pp(pp), .z(z), .row_a(row_a), .row_b(row_b));

  // The carry out of bit 2N is always zero because X*Y + Z < 2^(2N+1)
  hybrid_final_adder #(.W(W), .S1(S1), .S2(S2), .SKIP(SKIP)) u_cpa (
    .a(row_a), .b(row_b), .sum(p), .co(co_unused));
endmodule
