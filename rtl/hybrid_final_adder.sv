// hybrid_final_adder: final carry-propagate adder of a parallel multiplier,
// built to match the uneven arrival of its inputs from the reduction tree.
//
// The tree delivers the low-order bits early (few cells lie behind them), the
// middle bits last, and the high-order bits early again.  The adder is cut
// into three regions at bit positions S1 and S2:
//   * bits [0, S1): ripple carry.  The inputs here arrive one after another,
//     so a carry rippling upward meets inputs that are just arriving;
//   * bits [S1, S2): one level of carry-skip blocks of SKIP bits.  Each block
//     ripples internally; its carry-out is the block carry-in when every bit
//     of the block propagates, otherwise the block's own rippled carry;
//   * bits [S2, W): carry select.  The inputs here arrive early, so the sum is
//     formed for both carry-in values ahead of time and the carry arriving
//     at S2 only drives a multiplexer.
// The three-region structure follows the method the design is based on; the
// block size SKIP and the rule giving the default cut points (S1 = W/3,
// S2 = 2W/3, which for the 24-bit multiplier-add land on the edges of the
// flat, latest part of the arrival profile) are this design's choices.
// Purely combinational; sum = a + b modulo 2^W, co is the carry out of bit W-1.
module hybrid_final_adder #(
  parameter int unsigned W    = 49,
  parameter int unsigned S1   = 16,
  parameter int unsigned S2   = 32,
  parameter int unsigned SKIP = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         co
);
  // Number of carry-skip blocks; the last one may be shorter than SKIP
  localparam int unsigned NSKIP = (S2 - S1 + SKIP - 1) / SKIP;

  // c[i] is the carry into bit i
  logic [W:0] c;
  assign c[0] = 1'b0;

  // Region 1: ripple carry
  for (genvar i = 0; i < int'(S1); i++) begin : g_ripple
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(sum[i]), .co(c[i+1]));
  end

  // Region 2: one-level carry skip
  for (genvar k = 0; k < int'(NSKIP); k++) begin : g_skip
    localparam int unsigned LO = S1 + k*SKIP;
    localparam int unsigned HI = (LO + SKIP < S2) ? LO + SKIP : S2;  // exclusive
    logic [HI-LO:0] rc;        // ripple carries inside the block
    logic [HI-LO-1:0] prop;
    assign rc[0] = c[LO];
    for (genvar i = LO; i < int'(HI); i++) begin : g_bit
      full_adder u_fa (.a(a[i]), .b(b[i]), .ci(rc[i-LO]), .s(sum[i]), .co(rc[i-LO+1]));
      assign prop[i-LO] = a[i] ^ b[i];
      if (i > LO) begin : g_int
        assign c[i] = rc[i-LO];
      end
    end
    // Skip path: a block that propagates everywhere passes its carry-in on
    assign c[HI] = (&prop) ? c[LO] : rc[HI-LO];
  end

  // Region 3: carry select
  if (S2 < W) begin : g_select
    logic [W-S2:0] sum0, sum1;
    assign sum0 = {1'b0, a[W-1:S2]} + {1'b0, b[W-1:S2]};
    assign sum1 = {1'b0, a[W-1:S2]} + {1'b0, b[W-1:S2]} + 1'b1;
    assign sum[W-1:S2] = c[S2] ? sum1[W-S2-1:0] : sum0[W-S2-1:0];
    assign co          = c[S2] ? sum1[W-S2]     : sum0[W-S2];
    // Carries inside the select region are not formed one by one
    assign c[W:S2+1] = '0;
  end else begin : g_no_select
    assign co = c[W];
  end
endmodule
