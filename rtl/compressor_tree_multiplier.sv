// compressor_tree_multiplier: N x N unsigned parallel multiplier whose
// partial-product rows are reduced by levels of K:2 compressors.
//
// The N partial-product rows (x AND y[i], shifted left by i) are 2N-bit
// operands.  Each tree level splits its rows into groups of K; a group of
// three or more rows is reduced to two by a compressor_row (padding missing
// rows with zeros), a group of one or two rows passes to the next level
// untouched.  Levels repeat until two rows remain, which a carry-propagate
// adder sums.  With K = 3 this is a Wallace tree of full adders (a 24-bit
// multiplier needs 7 levels, the minimum stage count for 19 < N <= 28); with
// K = 4 it is a 4:2 compressor tree (24 -> 12 -> 6 -> 4 -> 2, 4 levels);
// with K = 9 a 9:2 compressor tree (24 -> 6 -> 2, 2 levels); with K = 24 a
// single row of 24:2 compressors (1 level).
// The grouping into rows and the behavioural final adder ("+") are this
// design's choices.  Purely combinational; p = x * y.
module compressor_tree_multiplier #(
  parameter int unsigned N = 24,
  parameter int unsigned K = 4     // 3 (Wallace), 4 (4:2), 9 (9:2), or any larger K
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  localparam int unsigned W = 2*N;

  // Rows after one level that starts with n rows
  function automatic int unsigned next_rows(int unsigned n);
    int unsigned full = n / K;
    int unsigned rem  = n % K;
    return 2*full + ((rem >= 3) ? 2 : rem);
  endfunction

  function automatic int unsigned num_levels();
    int unsigned n = N;
    int unsigned l = 0;
    while (n > 2) begin
      n = next_rows(n);
      l++;
    end
    return l;
  endfunction

  function automatic int unsigned rows_at(int unsigned level);
    int unsigned n = N;
    for (int unsigned l = 0; l < level; l++) n = next_rows(n);
    return n;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  // Partial-product rows
  logic [W-1:0] pp_rows [N];
  for (genvar r = 0; r < int'(N); r++) begin : g_pp
    assign pp_rows[r] = W'({N{y[r]}} & x) << r;
  end

  // Level l reduces cur (rows_at(l) rows) to nxt (rows_at(l+1) rows); rows
  // beyond the count are zero
  for (genvar l = 0; l < int'(LEVELS); l++) begin : g_level
    localparam int unsigned NIN  = rows_at(l);
    localparam int unsigned NOUT = rows_at(l+1);
    localparam int unsigned NGRP = (NIN + K - 1) / K;
    logic [W-1:0] cur [N];
    logic [W-1:0] nxt [N];
    if (l == 0) begin : g_first
      assign cur = pp_rows;
    end else begin : g_chain
      assign cur = g_level[l-1].nxt;
    end
    for (genvar g = 0; g < int'(NGRP); g++) begin : g_grp
      localparam int unsigned FIRST = g*K;
      localparam int unsigned SIZE  = (NIN - FIRST < K) ? NIN - FIRST : K;
      if (SIZE >= 3) begin : g_comp
        logic [W-1:0] in_rows [K];
        for (genvar r = 0; r < int'(K); r++) begin : g_in
          if (r < int'(SIZE)) begin : g_used
            assign in_rows[r] = cur[FIRST + r];
          end else begin : g_pad
            assign in_rows[r] = '0;
          end
        end
        compressor_row #(.W(W), .K(K)) u_row (
          .rows(in_rows), .sum(nxt[2*g]), .carry(nxt[2*g+1]));
      end else begin : g_pass
        for (genvar r = 0; r < int'(SIZE); r++) begin : g_row
          assign nxt[2*g + r] = cur[FIRST + r];
        end
      end
    end
    for (genvar r = NOUT; r < int'(N); r++) begin : g_zero
      assign nxt[r] = '0;
    end
  end

  // Final carry-propagate adder on the last two rows
  assign p = g_level[LEVELS-1].nxt[0] + g_level[LEVELS-1].nxt[1];
endmodule
