// compressor_row: one level of a row-wise reduction tree.
//
// Reduces K operand rows of W bits to two rows (sum and carry) with one
// compressor per bit position: a full adder for K = 3, a 4:2 compressor for
// K = 4, a 9:2 compressor for K = 9, and the generic compressor_n_2 for any
// other K (for example 13 or 24).  The lateral carries of the 4:2 and 9:2
// compressors go from position j to position j+1; position 0 receives zeros.
// The carry row is already shifted to its weight, so
//   sum(rows) = sum + carry   (modulo 2^W).
// Carries out of bit W-1 are dropped: the caller makes W wide enough that the
// total fits.  Purely combinational.
//
// Follows the lecture: a tree level built from one compressor per column,
// with lateral carries passed to the next column.  Own choices: the carry row
// pre-shifted by one bit and the generic compressor for other K.
module compressor_row #(
  parameter int unsigned W = 48,
  parameter int unsigned K = 4    // 3 or more
) (
  input  logic [W-1:0] rows [K],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] cy;   // carry of position j, weight j+1
  assign carry = {cy[W-2:0], 1'b0};

  if (K == 3) begin : g_k3
    for (genvar j = 0; j < int'(W); j++) begin : g_bit
      full_adder u_fa (.a(rows[0][j]), .b(rows[1][j]), .ci(rows[2][j]),
                       .s(sum[j]), .co(cy[j]));
    end
  end else if (K == 4) begin : g_k4
    logic [W:0] lat;    // lateral carry into position j
    assign lat[0] = 1'b0;
    for (genvar j = 0; j < int'(W); j++) begin : g_bit
      compressor_4_2 u_c42 (.x1(rows[0][j]), .x2(rows[1][j]), .x3(rows[2][j]),
                            .x4(rows[3][j]), .ci(lat[j]), .sum(sum[j]),
                            .carry(cy[j]), .co(lat[j+1]));
    end
  end else if (K == 9) begin : g_k9
    logic [5:0] lat [W+1];
    assign lat[0] = '0;
    for (genvar j = 0; j < int'(W); j++) begin : g_bit
      logic [8:0] xin;
      for (genvar r = 0; r < 9; r++) begin : g_in
        assign xin[r] = rows[r][j];
      end
      compressor_9_2 u_c92 (.x(xin), .ci(lat[j]), .sum(sum[j]), .carry(cy[j]),
                            .co(lat[j+1]));
    end
  end else begin : g_kn
    // any other K >= 4: generic K:2 compressor with K-3 lateral carries
    logic [K-4:0] lat [W+1];
    assign lat[0] = '0;
    for (genvar j = 0; j < int'(W); j++) begin : g_bit
      logic [K-1:0] xin;
      for (genvar r = 0; r < int'(K); r++) begin : g_in
        assign xin[r] = rows[r][j];
      end
      compressor_n_2 #(.NIN(K)) u_cn2 (.x(xin), .ci(lat[j]), .sum(sum[j]), .carry(cy[j]),
                                      .co(lat[j+1]));
    end
  end
endmodule
