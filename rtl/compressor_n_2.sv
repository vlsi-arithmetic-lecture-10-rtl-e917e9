// compressor_n_2: generic NIN:2 compressor built from full adders in levels,
// with NIN-3 lateral carries.
//
// Adds NIN bits x of weight 1 and NIN-3 lateral carries ci from the
// compressor one position lower, and returns sum (weight 1), carry (weight 2)
// and NIN-3 lateral carries co (weight 2) for the position above:
//   popcount(x) + popcount(ci) = sum + 2*(carry + popcount(co)).
// Construction, level by level: the signals available at a level (inputs not
// yet used, sums of the previous level, and the carry-ins that pair with the
// carry-outs of the previous level) are taken three at a time by full
// adders; one or two left over pass to the next level.  Each level's carries
// leave as co, in creation order, and the matching ci enter the next level,
// so a row of these compressors never ripples laterally.  When three signals
// remain, the last full adder gives sum and carry.  NIN-2 full adders in all.
// This greedy construction reproduces the full-adder level counts of the
// compressor family: 4:2 -> 2, 6:2 -> 3, 9:2 -> 4, 13:2 -> 5, 18:2 -> 6,
// 24:2 -> 7, 53:2 -> 9 (localparam LEVELS).  The construction itself is this
// design's; it does not reproduce optimised gate-level cells.
// As in tdm_tree, the wiring is computed at elaboration and evaluated in
// creation order by an always_comb block.  Purely combinational.
module compressor_n_2
  import mult_pkg::*;
#(
  parameter int unsigned NIN = 13,
  localparam int unsigned NL = NIN - 3      // lateral carries
) (
  input  logic [NIN-1:0] x,
  input  logic [NL-1:0]  ci,
  output logic           sum,
  output logic           carry,
  output logic [NL-1:0]  co
);
  localparam int unsigned NFA  = NIN - 2;
  localparam int unsigned NB   = NIN + NL;          // first adder output net
  localparam int unsigned NNET = NB + 2*NFA;
  localparam int unsigned IW   = $clog2(NNET);
  localparam int unsigned OFF_LV = NFA*3*IW;
  localparam int unsigned SW     = OFF_LV + 32;

  typedef logic [SW-1:0] sched_t;

  function automatic sched_t build_schedule();
    int unsigned pool [NNET];
    int unsigned npool, nnew, nfa, lvl, nci, first_fa;
    int unsigned nxt [NNET];
    sched_t sch;
    sch   = '0;
    npool = 0;
    for (int i = 0; i < int'(NIN); i++) begin
      pool[npool] = i;
      npool++;
    end
    nfa = 0;
    nci = 0;
    lvl = 0;
    while (npool >= 3) begin
      lvl++;
      first_fa = nfa;
      nnew = 0;
      if (npool == 3) begin
        // final adder
        sch[nfa*3*IW +: 3*IW] = {IW'(pool[0]), IW'(pool[1]), IW'(pool[2])};
        nfa++;
        npool = 0;
      end else begin
        for (int g = 0; g < int'(npool / 3); g++) begin
          sch[nfa*3*IW +: 3*IW] = {IW'(pool[3*g]), IW'(pool[3*g+1]), IW'(pool[3*g+2])};
          nxt[nnew] = NB + 2*nfa;           // sum stays in this position
          nnew++;
          nfa++;
        end
        for (int r = 3*int'(npool / 3); r < int'(npool); r++) begin
          nxt[nnew] = pool[r];
          nnew++;
        end
        // carry-ins matching this level's carry-outs
        for (int k = int'(first_fa); k < int'(nfa); k++) begin
          nxt[nnew] = NIN + nci;
          nnew++;
          nci++;
        end
        npool = nnew;
        for (int i = 0; i < int'(npool); i++) pool[i] = nxt[i];
      end
    end
    sch[OFF_LV +: 32] = 32'(lvl);
    return sch;
  endfunction

  localparam sched_t      SCHED  = build_schedule();
  // Number of full-adder levels
  localparam int unsigned LEVELS = int'(SCHED[OFF_LV +: 32]);

  logic [NNET-1:0] net;
  always_comb begin
    logic [3*IW-1:0] cdesc;
    logic a, b, c;
    net = '0;
    net[NIN-1:0]  = x;
    net[NB-1:NIN] = ci;
    for (int k = 0; k < int'(NFA); k++) begin
      cdesc = SCHED[k*3*IW +: 3*IW];
      a     = net[cdesc[3*IW-1:2*IW]];
      b     = net[cdesc[2*IW-1:IW]];
      c     = net[cdesc[IW-1:0]];
      net[NB + 2*k]     = fa_sum(a, b, c);
      net[NB + 2*k + 1] = fa_carry(a, b, c);
    end
    // carries of all but the last adder leave laterally, in creation order
    for (int k = 0; k < int'(NL); k++) co[k] = net[NB + 2*k + 1];
    sum   = net[NB + 2*(NFA-1)];
    carry = net[NB + 2*(NFA-1) + 1];
  end
endmodule
