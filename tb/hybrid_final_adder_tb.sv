// hybrid_final_adder_tb: checks the three-region adder (W = 49, S1 = 16,
// S2 = 32, 4-bit skip blocks) against a + b.  Besides random operands it
// drives patterns that make a carry enter a fully propagating skip block (the
// skip path), that make a skip block generate its own carry, and that select
// the carry-in-one sum of the carry-select region; each event is counted and
// must occur.  A small second instance with uneven cut points and a partial
// last skip block is checked exhaustively over a reduced set.
//
// Timing: Combinational DUTs, one operand pair per time unit (#1).
// No ports; it ends with a TB_RESULT line and $finish, and a watchdog stops a hung run.
// The expected values and level counts come from the lecture; the stimulus
// and the reference models (the * and + operators) are this testbench's own.
module hybrid_final_adder_tb;
  localparam int unsigned W = 49;
  logic [W-1:0] a, b, sum;
  logic         co;
  logic [W:0]   ref_sum;
  int checks = 0, failures = 0;
  int n_skip = 0, n_select1 = 0;

  hybrid_final_adder #(.W(W), .S1(16), .S2(32), .SKIP(4)) dut (
    .a(a), .b(b), .sum(sum), .co(co));

  // Second instance: W = 11, ripple 3 bits, skip region 3..8 (blocks 3+3), select 9..10
  logic [10:0] a2, b2, sum2;
  logic        co2;
  hybrid_final_adder #(.W(11), .S1(3), .S2(9), .SKIP(3)) dut2 (
    .a(a2), .b(b2), .sum(sum2), .co(co2));

  task automatic check();
    logic [W:0] carries;
    #1;
    ref_sum = {1'b0, a} + {1'b0, b};
    checks++;
    if ({co, sum} !== ref_sum) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h -> %h, expected %h", a, b, {co, sum}, ref_sum);
    end
    // carries into every bit, worked out from the reference sum
    carries = ref_sum ^ {1'b0, a} ^ {1'b0, b};
    for (int k = 0; k < 4; k++)
      if (carries[16 + 4*k] && ((a[16+4*k +: 4] ^ b[16+4*k +: 4]) == 4'hF)) n_skip++;
    if (carries[32]) n_select1++;
  endtask

  initial begin
    a = '0; b = '0; check();
    a = '1; b = 49'd1; check();                   // carry through everything
    a = {17'h0, 16'hFFFF, 16'hFFFF}; b = 49'd1; check();
    a = {17'h0, 16'h0F0F, 16'h8000}; b = {17'h0, 16'h00F0, 16'h8000}; check();
    for (int t = 0; t < 3000; t++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      // sometimes make the middle region all-propagate
      if (t % 3 == 0) b[31:16] = ~a[31:16];
      check();
    end
    for (int t = 0; t < 4096; t++) begin
      a2 = 11'($urandom); b2 = 11'($urandom);
      if (t % 4 == 0) b2[8:3] = ~a2[8:3];
      #1;
      checks++;
      if ({co2, sum2} !== {1'b0, a2} + {1'b0, b2}) begin
        failures++;
        if (failures < 10) $display("FAIL small a=%h b=%h -> %h", a2, b2, {co2, sum2});
      end
    end
    checks++;
    if (n_skip == 0) begin failures++; $display("FAIL skip path never used"); end
    checks++;
    if (n_select1 == 0) begin failures++; $display("FAIL carry-select never took the 1 sum"); end
    $display("skip events %0d, select-1 events %0d", n_skip, n_select1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
