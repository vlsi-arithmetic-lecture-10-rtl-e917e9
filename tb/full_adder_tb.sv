// full_adder_tb: exhaustive check of the (3,2) counter: a + b + ci = s + 2*co.
//
// Timing: Combinational DUT, one input vector per time unit (#1).
// No ports; it ends with a TB_RESULT line and $finish, and a watchdog stops a hung run.
// The expected values and level counts come from the lecture; the stimulus
// and the reference models (the * and + operators) are this testbench's own.
module full_adder_tb;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if (2*int'(co) + int'(s) != int'(a) + int'(b) + int'(ci)) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d -> s=%0d co=%0d", a, b, ci, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
