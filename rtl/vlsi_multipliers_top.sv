// vlsi_multipliers_top: the multipliers of this collection, side by side.
//
// Each unit keeps its own ports; nothing is shared but the clock and reset of
// the sequential unit.
//   * tdm_*   : 24 x 24 multiply-add X*Y+Z with a TDM-wired reduction tree and
//               a hybrid ripple / carry-skip / carry-select final adder.
//   * wal_*   : 24 x 24 multiplier, Wallace tree of full adders (3:2 rows).
//   * c42_*   : 24 x 24 multiplier, tree of 4:2 compressor rows.
//   * c92_*   : 24 x 24 multiplier, tree of 9:2 compressor rows.
//   * c242_*  : 24 x 24 multiplier, one row of 24:2 compressors.
//   * dad_*   : 24 x 24 multiplier, Dadda column reduction (7 stages).
//   * seq_*   : 6 x 6 radix-2 sequential shift-and-add multiplier with a
//               start / busy / done handshake, one digit per clock.
// All parallel units are combinational; the sequential one is synchronous to
// clk with active-low asynchronous reset rst_n.
//
// Follows the lecture: the set of multiplier organisations it covers.  Own
// choices: placing them in one top level, the 24-bit and 6-bit sizes, and the
// port names.
module vlsi_multipliers_top #(
  parameter int unsigned N     = 24,
  parameter int unsigned SEQ_N = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  // TDM multiply-add
  input  logic [N-1:0]     tdm_x,
  input  logic [N-1:0]     tdm_y,
  input  logic [2*N-1:0]   tdm_z,
  output logic [2*N:0]     tdm_p,
  // Wallace tree
  input  logic [N-1:0]     wal_x,
  input  logic [N-1:0]     wal_y,
  output logic [2*N-1:0]   wal_p,
  // 4:2 compressor tree
  input  logic [N-1:0]     c42_x,
  input  logic [N-1:0]     c42_y,
  output logic [2*N-1:0]   c42_p,
  // 9:2 compressor tree
  input  logic [N-1:0]     c92_x,
  input  logic [N-1:0]     c92_y,
  output logic [2*N-1:0]   c92_p,
  // 24:2 compressor row
  input  logic [N-1:0]     c242_x,
  input  logic [N-1:0]     c242_y,
  output logic [2*N-1:0]   c242_p,
  // Dadda tree
  input  logic [N-1:0]     dad_x,
  input  logic [N-1:0]     dad_y,
  output logic [2*N-1:0]   dad_p,
  // Sequential multiplier
  input  logic             seq_start,
  input  logic [SEQ_N-1:0] seq_x,
  input  logic [SEQ_N-1:0] seq_y,
  output logic             seq_busy,
  output logic             seq_done,
  output logic [2*SEQ_N-1:0] seq_p
);
  tdm_multiplier #(.N(N)) u_tdm (.x(tdm_x), .y(tdm_y), .z(tdm_z), .p(tdm_p));

  compressor_tree_multiplier #(.N(N), .K(3)) u_wallace (
    .x(wal_x), .y(wal_y), .p(wal_p));
  compressor_tree_multiplier #(.N(N), .K(4)) u_c42 (
    .x(c42_x), .y(c42_y), .p(c42_p));
  compressor_tree_multiplier #(.N(N), .K(9)) u_c92 (
    .x(c92_x), .y(c92_y), .p(c92_p));
  compressor_tree_multiplier #(.N(N), .K(24)) u_c242 (
    .x(c242_x), .y(c242_y), .p(c242_p));
  dadda_multiplier #(.N(N)) u_dadda (.x(dad_x), .y(dad_y), .p(dad_p));

  seq_multiplier #(.N(SEQ_N), .LOG2R(1)) u_seq (
    .clk(clk), .rst_n(rst_n), .start(seq_start), .x(seq_x), .y(seq_y),
    .busy(seq_busy), .done(seq_done), .p(seq_p));
endmodule
