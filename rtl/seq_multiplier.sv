// seq_multiplier: sequential shift-and-add multiplier, radix r = 2^LOG2R.
//
// Implements the digit recurrence
//   p(0) = 0,  p(j+1) = (p(j) + r^n * X * y_j) / r,  j = 0 .. n-1,
// where y_j is the j-th radix-r digit of Y (least significant first) and
// n = N / LOG2R; after n steps p(n) = X * Y.  The register pair {hi, lo}
// holds p(j): each step adds the digit multiple X * y_j into the upper half
// (hi, N + LOG2R bits wide so the sum cannot overflow) and shifts the pair
// right by one digit, so the digit that falls out of hi becomes a finished
// low-order digit of the product in lo.
//
// Interface: a one-cycle start while !busy loads x and y; busy is then high for
// n cycles, one digit per cycle; done pulses for one cycle in the cycle after
// the last step and p holds the product from then until the next start.
// Synchronous to clk, active-low asynchronous reset.  The handshake and the
// reset behaviour are this design's choices; the radix defaults to 2.
module seq_multiplier #(
  parameter int unsigned N     = 6,
  parameter int unsigned LOG2R = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] p
);
  localparam int unsigned ND = N / LOG2R;          // number of digits
  localparam int unsigned CW = $clog2(ND + 1);

  logic [N-1:0]       x_q, y_q;
  logic [N+LOG2R-1:0] hi_q;
  logic [N-1:0]       lo_q;
  logic [CW-1:0]      cnt_q;
  logic [N+LOG2R-1:0] t;                            // p(j) upper part + X*y_j

  initial begin
    if (N % LOG2R != 0) $error("seq_multiplier: N must be a multiple of LOG2R");
  end

  assign t = hi_q + (N+LOG2R)'(x_q * y_q[LOG2R-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      y_q   <= '0;
      hi_q  <= '0;
      lo_q  <= '0;
      cnt_q <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        x_q   <= x;
        y_q   <= y;
        hi_q  <= '0;
        lo_q  <= '0;
        cnt_q <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        // divide by r: shift {t, lo} right by one digit
        {hi_q, lo_q} <= (2*N+LOG2R)'({t, lo_q} >> LOG2R);
        y_q          <= y_q >> LOG2R;
        cnt_q        <= cnt_q + 1'b1;
        if (cnt_q == CW'(ND - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign p = {hi_q[N-1:0], lo_q};

  // The upper LOG2R bits of hi are zero once the recurrence has finished
  assert property (@(posedge clk) disable iff (!rst_n) done |-> hi_q[N+LOG2R-1:N] == '0);
endmodule
