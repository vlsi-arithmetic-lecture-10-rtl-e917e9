// compressor_9_2_tb: exhaustive check of the 9:2 compressor over all 2^15
// combinations of x[8:0] and ci[5:0]:
//   popcount(x) + popcount(ci) = sum + 2*(carry + popcount(co)).
// Also checks that co[3:0] depend on x only, so a row of these compressors
// has no lateral ripple.
//
// Timing: Combinational DUT, one input vector per time unit (#1).
// No ports; it ends with a TB_RESULT line and $finish, and a watchdog stops a hung run.
// The expected values and level counts come from the lecture; the stimulus
// and the reference models (the * and + operators) are this testbench's own.
module compressor_9_2_tb;
  logic [8:0] x;
  logic [5:0] ci, co;
  logic       sum, carry;
  logic [3:0] co_ref;
  int checks = 0, failures = 0;

  compressor_9_2 dut (.x(x), .ci(ci), .sum(sum), .carry(carry), .co(co));

  initial begin
    for (int xv = 0; xv < 512; xv++) begin
      x  = 9'(xv);
      ci = '0;
      #1;
      co_ref = co[3:0];
      for (int cv = 0; cv < 64; cv++) begin
        ci = 6'(cv);
        #1;
        checks++;
        if (int'(sum) + 2*(int'(carry) + $countones(co)) != $countones(x) + $countones(ci)) begin
          failures++;
          if (failures < 10)
            $display("FAIL x=%b ci=%b -> sum=%b carry=%b co=%b", x, ci, sum, carry, co);
        end
        checks++;
        if (co[3:0] !== co_ref) begin
          failures++;
          if (failures < 10) $display("FAIL co[3:0] depends on ci, x=%b", x);
        end
      end
    end
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
