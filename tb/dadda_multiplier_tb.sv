// dadda_multiplier_tb: Dadda-tree multipliers of several sizes.  Each product
// is compared with x * y (formed by the * operator), and the number of
// reduction stages with the minimum stage count for that word length:
//   N = 3: 1, 4: 2, 5..6: 3, 7..9: 4, 10..13: 5, 14..19: 6, 20..28: 7.
//
// Timing: Combinational DUTs, one operand pair per time unit (#1).
// No ports; it ends with a TB_RESULT line and $finish, and a watchdog stops a hung run.
// The expected values and level counts come from the lecture; the stimulus
// and the reference models (the * and + operators) are this testbench's own.
module dadda_multiplier_tb;
  int checks = 0, failures = 0;

  localparam int NUM = 8;
  localparam int SIZES  [NUM] = '{3, 4, 5, 6, 9, 13, 19, 24};
  localparam int STAGES [NUM] = '{1, 2, 3, 3, 4, 5, 6, 7};
  bit done_gen [NUM];

  for (genvar g = 0; g < NUM; g++) begin : g_size
    localparam int unsigned N = SIZES[g];
    logic [N-1:0]   x, y;
    logic [2*N-1:0] p;
    dadda_multiplier #(.N(N)) dut (.x(x), .y(y), .p(p));
    initial begin
      checks++;
      if (int'(dut.STAGES) != STAGES[g]) begin
        failures++;
        $display("FAIL N=%0d: %0d stages, expected %0d", N, dut.STAGES, STAGES[g]);
      end
      for (int t = 0; t < 1000; t++) begin
        if (N <= 5) begin
          x = N'(t); y = N'(t >> N);
        end else begin
          case (t)
            0: begin x = '1; y = '1; end
            1: begin x = '1; y = N'(1); end
            default: begin x = N'($urandom); y = N'($urandom); end
          endcase
        end
        #1;
        checks++;
        if (p !== (2*N)'(x) * (2*N)'(y)) begin
          failures++;
          if (failures < 10) $display("FAIL N=%0d %h*%h -> %h", N, x, y, p);
        end
      end
      done_gen[g] = 1'b1;
    end
  end

  initial begin
    #1100;
    for (int g = 0; g < NUM; g++) begin
      checks++;
      if (!done_gen[g]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
