// tdm_tree: partial-product reduction tree wired by the Three-Dimensional
// Method (TDM).
//
// The tree takes the N x N partial-product matrix (and, when ADDEND is set, a
// 2N-bit addend that enters every column as one more bit) and reduces it to
// two rows, row_a and row_b, for a final carry-propagate adder.
//
// How it works.  Each column of the matrix is a list of signals with an
// arrival time.  Columns are processed from the least significant upwards.
// Within a column the list is kept sorted by arrival time; if it holds an even
// number of signals a half adder takes the two earliest, then full adders take
// the three earliest signals at a time until three remain.  The earliest
// signals go to the slow A and B inputs of a full adder and the latest of the
// three to the fast carry-in, so the slow paths of the cell are spent on
// signals that have time to spare.  Sums re-enter the same column's list at
// their computed arrival time, carries enter the next column's list.  The last
// three signals of a column go to one full adder whose sum is row_a[i] and
// whose carry is row_b[i+1].  Columns 0 and 1, which hold at most two bits and
// no carry, go straight to the final adder.  Cell timing is the model of
// mult_pkg: full adder A/B->S 2 XOR, Cin->S and any->C 1 XOR; half adder 1 XOR
// to S and 0.5 XOR to C.  This is the column algorithm the method prescribes.
//
// Implementation.  The wiring is computed once, at elaboration, by the
// constant function build_schedule(): it runs the algorithm on arrival times
// only and records, for every cell in creation order, which nets feed it.  The
// always_comb block then evaluates the cells in that order, so the logic is a
// fixed tree of full and half adders.  Cells are numbered in creation order,
// which is also a topological order.  Net 0 is constant 0; nets 1..N*N are the
// partial products; the addend follows; cell k drives nets NB+2k (sum) and
// NB+2k+1 (carry).  A carry leaving the top column is dropped: for a product
// (plus addend) that fits in W bits it is always zero.
//
// The arrival time of every output bit, in half-XOR units, is kept in the
// localparam arrays ARR_A and ARR_B and their maximum in MAX_DELAY, so the
// final adder can be fitted to the profile.  Purely combinational.
//
// Follows the lecture: the column algorithm and the slow/fast input rule.
// Own choices: the half-adder rule for even counts, the delay numbers of the
// cell model, the net numbering and the elaboration-time scheduling.
module tdm_tree
  import mult_pkg::*;
#(
  parameter int unsigned N      = 24,
  parameter bit          ADDEND = 1'b0,
  // Number of output columns
  localparam int unsigned W     = 2*N + (ADDEND ? 1 : 0)
) (
  input  logic [N*N-1:0] pp,     // pp[i*N+j] has weight 2^(i+j)
  input  logic [2*N-1:0] z,      // addend, used only when ADDEND = 1
  output logic [W-1:0]   row_a,
  output logic [W-1:0]   row_b
);

  localparam int unsigned NPP   = N*N;
  localparam int unsigned NZ    = ADDEND ? 2*N : 0;
  localparam int unsigned NB    = 1 + NPP + NZ;          // first cell-output net
  localparam int unsigned MAXC  = NPP + NZ + 2*W;        // bound on cell count
  localparam int unsigned NNET  = NB + 2*MAXC;
  localparam int unsigned IW    = $clog2(NNET);
  localparam int unsigned MAXL  = 4*N + 8;               // bound on a column list
  localparam int unsigned CELLW = 1 + 3*IW;              // {is_fa, a, b, c}
  localparam int unsigned DW    = 8;                     // delay field width
  // Offsets of the fields of the packed schedule
  localparam int unsigned OFF_RA = MAXC*CELLW;
  localparam int unsigned OFF_RB = OFF_RA + W*IW;
  localparam int unsigned OFF_DA = OFF_RB + W*IW;
  localparam int unsigned OFF_DB = OFF_DA + W*DW;
  localparam int unsigned OFF_NC = OFF_DB + W*DW;
  localparam int unsigned SW     = OFF_NC + 32;

  typedef logic [SW-1:0] sched_t;

  function automatic sched_t build_schedule();
    int unsigned lnet [(W+1)*MAXL];
    int unsigned ldly [(W+1)*MAXL];
    int unsigned head [W+1];
    int unsigned tail [W+1];
    bit          has_b [W+1];
    int unsigned nc;
    int unsigned sn, cn, ds, dc, da, db, dcin, e;
    int          pos;
    sched_t      sch;

    sch = '0;
    nc  = 0;
    for (int c = 0; c <= W; c++) begin
      head[c]  = 0;
      tail[c]  = 0;
      has_b[c] = 1'b0;
    end
    // Partial products (all arrive at time 0)
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        lnet[(r+c)*MAXL + tail[r+c]] = 1 + r*N + c;
        ldly[(r+c)*MAXL + tail[r+c]] = 0;
        tail[r+c]++;
      end
    // Addend bits (arrive at time 0)
    for (int c = 0; c < NZ; c++) begin
      lnet[(c)*MAXL + tail[c]] = 1 + NPP + c;
      ldly[(c)*MAXL + tail[c]] = 0;
      tail[c]++;
    end

    for (int i = 0; i < W; i++) begin
      if (!has_b[i] && (tail[i] - head[i]) <= 2) begin
        // Short column without an incoming final carry: straight to the adder
        if (tail[i] - head[i] >= 1) begin
          sch[OFF_RA + i*IW +: IW] = IW'(lnet[(i)*MAXL + head[i]]);
          sch[OFF_DA + i*DW +: DW] = DW'(ldly[(i)*MAXL + head[i]]);
        end
        if (tail[i] - head[i] == 2) begin
          sch[OFF_RB + i*IW +: IW] = IW'(lnet[(i)*MAXL + head[i]+1]);
          sch[OFF_DB + i*DW +: DW] = DW'(ldly[(i)*MAXL + head[i]+1]);
        end
      end else begin
        // Even length: one half adder on the two earliest signals
        if (((tail[i] - head[i]) % 2) == 0 && (tail[i] - head[i]) >= 2) begin
          da = ldly[(i)*MAXL + head[i]];
          db = ldly[(i)*MAXL + head[i]+1];
          sch[nc*CELLW +: CELLW] = {1'b0, IW'(lnet[(i)*MAXL + head[i]]),
                                    IW'(lnet[(i)*MAXL + head[i]+1]), IW'(0)};
          head[i] += 2;
          ds = ((da > db) ? da : db) + HA_ANY_S;
          dc = ((da > db) ? da : db) + HA_ANY_C;
          sn = NB + 2*nc;
          cn = NB + 2*nc + 1;
          nc++;
          // sorted (stable) insertion of the sum into column i
          pos = int'(tail[i]) - 1;
          while (pos >= int'(head[i]) && ldly[(i)*MAXL + pos] > ds) begin
            lnet[(i)*MAXL + pos+1] = lnet[(i)*MAXL + pos];
            ldly[(i)*MAXL + pos+1] = ldly[(i)*MAXL + pos];
            pos--;
          end
          lnet[(i)*MAXL + pos+1] = sn;
          ldly[(i)*MAXL + pos+1] = ds;
          tail[i]++;
          // carry into column i+1
          pos = int'(tail[i+1]) - 1;
          while (pos >= int'(head[i+1]) && ldly[(i+1)*MAXL + pos] > dc) begin
            lnet[(i+1)*MAXL + pos+1] = lnet[(i+1)*MAXL + pos];
            ldly[(i+1)*MAXL + pos+1] = ldly[(i+1)*MAXL + pos];
            pos--;
          end
          lnet[(i+1)*MAXL + pos+1] = cn;
          ldly[(i+1)*MAXL + pos+1] = dc;
          tail[i+1]++;
        end
        // Full adders on the three earliest signals while more than three remain
        while ((tail[i] - head[i]) > 3) begin
          e    = head[i];
          da   = ldly[(i)*MAXL + e];
          db   = ldly[(i)*MAXL + e+1];
          dcin = ldly[(i)*MAXL + e+2];
          sch[nc*CELLW +: CELLW] = {1'b1, IW'(lnet[(i)*MAXL + e]), IW'(lnet[(i)*MAXL + e+1]),
                                    IW'(lnet[(i)*MAXL + e+2])};
          head[i] += 3;
          ds = da + FA_AB_S;
          if (db + FA_AB_S > ds)   ds = db + FA_AB_S;
          if (dcin + FA_CI_S > ds) ds = dcin + FA_CI_S;
          dc = da;
          if (db > dc)   dc = db;
          if (dcin > dc) dc = dcin;
          dc += FA_ANY_C;
          sn = NB + 2*nc;
          cn = NB + 2*nc + 1;
          nc++;
          pos = int'(tail[i]) - 1;
          while (pos >= int'(head[i]) && ldly[(i)*MAXL + pos] > ds) begin
            lnet[(i)*MAXL + pos+1] = lnet[(i)*MAXL + pos];
            ldly[(i)*MAXL + pos+1] = ldly[(i)*MAXL + pos];
            pos--;
          end
          lnet[(i)*MAXL + pos+1] = sn;
          ldly[(i)*MAXL + pos+1] = ds;
          tail[i]++;
          pos = int'(tail[i+1]) - 1;
          while (pos >= int'(head[i+1]) && ldly[(i+1)*MAXL + pos] > dc) begin
            lnet[(i+1)*MAXL + pos+1] = lnet[(i+1)*MAXL + pos];
            ldly[(i+1)*MAXL + pos+1] = ldly[(i+1)*MAXL + pos];
            pos--;
          end
          lnet[(i+1)*MAXL + pos+1] = cn;
          ldly[(i+1)*MAXL + pos+1] = dc;
          tail[i+1]++;
        end
        if ((tail[i] - head[i]) == 3) begin
          // Last full adder of the column: S -> row_a[i], C -> row_b[i+1]
          e    = head[i];
          da   = ldly[(i)*MAXL + e];
          db   = ldly[(i)*MAXL + e+1];
          dcin = ldly[(i)*MAXL + e+2];
          sch[nc*CELLW +: CELLW] = {1'b1, IW'(lnet[(i)*MAXL + e]), IW'(lnet[(i)*MAXL + e+1]),
                                    IW'(lnet[(i)*MAXL + e+2])};
          ds = da + FA_AB_S;
          if (db + FA_AB_S > ds)   ds = db + FA_AB_S;
          if (dcin + FA_CI_S > ds) ds = dcin + FA_CI_S;
          dc = da;
          if (db > dc)   dc = db;
          if (dcin > dc) dc = dcin;
          dc += FA_ANY_C;
          sch[OFF_RA + i*IW +: IW] = IW'(NB + 2*nc);
          sch[OFF_DA + i*DW +: DW] = DW'(ds);
          if (i + 1 < W) begin
            sch[OFF_RB + (i+1)*IW +: IW] = IW'(NB + 2*nc + 1);
            sch[OFF_DB + (i+1)*DW +: DW] = DW'(dc);
            has_b[i+1] = 1'b1;
          end
          nc++;
        end else if ((tail[i] - head[i]) == 1) begin
          sch[OFF_RA + i*IW +: IW] = IW'(lnet[(i)*MAXL + head[i]]);
          sch[OFF_DA + i*DW +: DW] = DW'(ldly[(i)*MAXL + head[i]]);
        end
      end
    end
    sch[OFF_NC +: 32] = 32'(nc);
    return sch;
  endfunction

  localparam sched_t      SCHED  = build_schedule();
  localparam int unsigned NCELLS = int'(SCHED[OFF_NC +: 32]);

  function automatic int unsigned max_delay();
    int unsigned m = 0;
    for (int i = 0; i < W; i++) begin
      if (int'(SCHED[OFF_DA + i*DW +: DW]) > m) m = int'(SCHED[OFF_DA + i*DW +: DW]);
      if (int'(SCHED[OFF_DB + i*DW +: DW]) > m) m = int'(SCHED[OFF_DB + i*DW +: DW]);
    end
    return m;
  endfunction

  // Latest arrival at the final adder, in half-XOR units
  localparam int unsigned MAX_DELAY = max_delay();

  // Arrival profile seen by the final adder, one byte per column
  logic [DW-1:0] arr_a [W];
  logic [DW-1:0] arr_b [W];
  always_comb begin
    for (int i = 0; i < W; i++) begin
      arr_a[i] = SCHED[OFF_DA + i*DW +: DW];
      arr_b[i] = SCHED[OFF_DB + i*DW +: DW];
    end
  end

  // Evaluate the cells in creation order
  logic [NNET-1:0] net;
  always_comb begin
    logic [CELLW-1:0] cdesc;
    logic a, b, c;
    net = '0;
    net[NPP:1] = pp;
    for (int k = 0; k < int'(NZ); k++)
      net[1 + NPP + k] = z[k];
    for (int k = 0; k < int'(NCELLS); k++) begin
      cdesc = SCHED[k*CELLW +: CELLW];
      a    = net[cdesc[3*IW-1:2*IW]];
      b    = net[cdesc[2*IW-1:IW]];
      c    = net[cdesc[IW-1:0]];
      if (cdesc[CELLW-1]) begin
        net[NB + 2*k]     = fa_sum(a, b, c);
        net[NB + 2*k + 1] = fa_carry(a, b, c);
      end else begin
        net[NB + 2*k]     = a ^ b;
        net[NB + 2*k + 1] = a & b;
      end
    end
    for (int i = 0; i < W; i++) begin
      row_a[i] = net[SCHED[OFF_RA + i*IW +: IW]];
      row_b[i] = net[SCHED[OFF_RB + i*IW +: IW]];
    end
  end

endmodule
