// pp_array: partial-product bit matrix of an unsigned N x N multiplication.
//
// Bit pp[i*N + j] = x[j] & y[i] and has weight 2^(i+j), so column c of the
// matrix (the bits of weight 2^c) holds c+1 bits for c <= N-1 and 2N-1-c bits
// for c >= N.  One AND gate per bit, purely combinational.
//
// Follows the lecture: the AND-gate partial-product matrix of an unsigned
// multiplication.  Own choice: the flat row-major bit order of pp.
module pp_array #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [N*N-1:0] pp
);
  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        pp[i*N + j] = x[j] & y[i];
  end
endmodule
