// dadda_multiplier: N x N unsigned multiplier with a Dadda reduction tree.
//
// Dadda's rule reduces the partial-product matrix in as few stages as the
// column height allows, using as few counters as possible.  The sequence of
// allowed heights is d(1) = 2, d(k+1) = floor(3*d(k)/2): 2, 3, 4, 6, 9, 13,
// 19, 28, 42, 63 ...  A matrix of height N needs as many stages as there are
// terms of the sequence below N (24 bits: 7 stages).  Each stage targets the
// largest term below the current height; going up the columns it places
// only as many full adders (height -2) and half adders (height -1) as are
// needed to bring the column, counting the carries arriving from the column
// below in the same stage, down to the target.  After the stage whose target
// is 2, a carry-propagate adder ('+' here) adds the two rows.
//
// As in tdm_tree, the wiring is computed at elaboration by a constant
// function (build_schedule) and evaluated by an always_comb block in creation
// order, which is stage order.  Net 0 is constant 0, nets 1..N*N are the
// partial products x[j] & y[i] (net 1 + i*N + j), cell k drives nets NB+2k
// (sum) and NB+2k+1 (carry).  Purely combinational; p = x * y.
// The choice of '+' for the final adder and the order of cells within a
// column are this design's.
module dadda_multiplier
  import mult_pkg::*;
#(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  localparam int unsigned W     = 2*N;
  localparam int unsigned NPP   = N*N;
  localparam int unsigned NB    = 1 + NPP;
  localparam int unsigned MAXC  = NPP + W;
  localparam int unsigned NNET  = NB + 2*MAXC;
  localparam int unsigned IW    = $clog2(NNET);
  localparam int unsigned MAXL  = N + 8;
  localparam int unsigned CELLW = 1 + 3*IW;
  localparam int unsigned OFF_RA = MAXC*CELLW;
  localparam int unsigned OFF_RB = OFF_RA + W*IW;
  localparam int unsigned OFF_NC = OFF_RB + W*IW;
  localparam int unsigned OFF_NS = OFF_NC + 32;
  localparam int unsigned SW     = OFF_NS + 32;

  typedef logic [SW-1:0] sched_t;

  function automatic sched_t build_schedule();
    int unsigned cur [(W+1)*MAXL];
    int unsigned nxt [(W+1)*MAXL];
    int unsigned ncur [W+1];
    int unsigned nnxt [W+1];
    int unsigned seq [16];
    int unsigned nseq, d, nc, stages, h, take, k;
    sched_t sch;

    sch = '0;
    nc  = 0;
    stages = 0;
    // Dadda height sequence below N
    seq[0] = 2;
    nseq = 1;
    while (nseq < 16 && seq[nseq-1] < N) begin
      seq[nseq] = (3 * seq[nseq-1]) / 2;
      nseq++;
    end
    for (int c = 0; c <= W; c++) ncur[c] = 0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        cur[(r+c)*MAXL + ncur[r+c]] = 1 + r*N + c;
        ncur[r+c]++;
      end
    // Stages, largest target first
    for (int s = int'(nseq) - 1; s >= 0; s--) begin
      d = seq[s];
      if (d >= N) continue;
      stages++;
      for (int c = 0; c <= W; c++) nnxt[c] = 0;
      for (int i = 0; i < W; i++) begin
        k = 0;                                // next unused signal of cur[i]
        // height still to be reduced: unused cur signals + everything in nxt
        while ((ncur[i] - k) + nnxt[i] > d) begin
          h = (ncur[i] - k) + nnxt[i] - d;  // excess over the target
          take = (h >= 2 && ncur[i] - k >= 3) ? 3 : 2;
          if (take == 3)
            sch[nc*CELLW +: CELLW] = {1'b1, IW'(cur[i*MAXL + k]),
                                      IW'(cur[i*MAXL + k + 1]), IW'(cur[i*MAXL + k + 2])};
          else
            sch[nc*CELLW +: CELLW] = {1'b0, IW'(cur[i*MAXL + k]),
                                      IW'(cur[i*MAXL + k + 1]), IW'(0)};
          k += take;
          nxt[i*MAXL + nnxt[i]] = NB + 2*nc;
          nnxt[i]++;
          nxt[(i+1)*MAXL + nnxt[i+1]] = NB + 2*nc + 1;
          nnxt[i+1]++;
          nc++;
        end
        // the rest passes to the next stage unchanged
        while (k < ncur[i]) begin
          nxt[i*MAXL + nnxt[i]] = cur[i*MAXL + k];
          nnxt[i]++;
          k++;
        end
      end
      for (int c = 0; c <= W; c++) begin
        ncur[c] = nnxt[c];
        for (int e = 0; e < int'(nnxt[c]); e++) cur[c*MAXL + e] = nxt[c*MAXL + e];
      end
    end
    for (int i = 0; i < W; i++) begin
      if (ncur[i] >= 1) sch[OFF_RA + i*IW +: IW] = IW'(cur[i*MAXL]);
      if (ncur[i] >= 2) sch[OFF_RB + i*IW +: IW] = IW'(cur[i*MAXL + 1]);
    end
    sch[OFF_NC +: 32] = 32'(nc);
    sch[OFF_NS +: 32] = 32'(stages);
    return sch;
  endfunction

  localparam sched_t      SCHED  = build_schedule();
  localparam int unsigned NCELLS = int'(SCHED[OFF_NC +: 32]);
  // Number of reduction stages
  localparam int unsigned STAGES = int'(SCHED[OFF_NS +: 32]);

  logic [NNET-1:0] net;
  logic [W-1:0]    row_a, row_b;
  always_comb begin
    logic [CELLW-1:0] cdesc;
    logic a, b, c;
    net = '0;
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++)
        net[1 + i*N + j] = x[j] & y[i];
    for (int k = 0; k < int'(NCELLS); k++) begin
      cdesc = SCHED[k*CELLW +: CELLW];
      a     = net[cdesc[3*IW-1:2*IW]];
      b     = net[cdesc[2*IW-1:IW]];
      c     = net[cdesc[IW-1:0]];
      if (cdesc[CELLW-1]) begin
        net[NB + 2*k]     = fa_sum(a, b, c);
        net[NB + 2*k + 1] = fa_carry(a, b, c);
      end else begin
        net[NB + 2*k]     = a ^ b;
        net[NB + 2*k + 1] = a & b;
      end
    end
    for (int i = 0; i < int'(W); i++) begin
      row_a[i] = net[SCHED[OFF_RA + i*IW +: IW]];
      row_b[i] = net[SCHED[OFF_RB + i*IW +: IW]];
    end
  end

  assign p = row_a + row_b;
endmodule
