// compressor_4_2_tb: exhaustive check of the 4:2 compressor.
// Checks x1+x2+x3+x4+ci = sum + 2*(carry + co) for all 32 inputs, and that the
// lateral carry-out co never depends on the lateral carry-in ci (no ripple).
//
// Timing: Combinational DUT, one input vector per time unit (#1).
// No ports; it ends with a TB_RESULT line and $finish, and a watchdog stops a hung run.
// The expected values and level counts come from the lecture; the stimulus
// and the reference models (the * and + operators) are this testbench's own.
module compressor_4_2_tb;
  logic x1, x2, x3, x4, ci, sum, carry, co;
  logic co_ci0;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .ci(ci),
                      .sum(sum), .carry(carry), .co(co));

  initial begin
    for (int v = 0; v < 16; v++) begin
      {x1, x2, x3, x4} = 4'(v);
      ci = 1'b0;
      #1;
      co_ci0 = co;
      for (int c = 0; c < 2; c++) begin
        ci = 1'(c);
        #1;
        checks++;
        if (int'(sum) + 2*(int'(carry) + int'(co)) !=
            int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(ci)) begin
          failures++;
          $display("FAIL x=%b ci=%b -> sum=%b carry=%b co=%b", 4'(v), ci, sum, carry, co);
        end
        checks++;
        if (co !== co_ci0) begin
          failures++;
          $display("FAIL co depends on ci for x=%b", 4'(v));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
