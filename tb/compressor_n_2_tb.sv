// compressor_n_2_tb: the compressor family 4:2, 6:2, 9:2, 13:2, 18:2, 24:2
// and 53:2.  For each, the number of full-adder levels must match the
// family's published level count (2, 3, 4, 5, 6, 7, 9), and for random
// inputs and carry-ins the counting identity
//   popcount(x) + popcount(ci) = sum + 2*(carry + popcount(co))
// must hold.  The 4:2 case is also run exhaustively.
//
// Timing: Combinational DUTs, one input vector per time unit (#1).
// No ports; it ends with a TB_RESULT line and $finish, and a watchdog stops a hung run.
// The expected values and level counts come from the lecture; the stimulus
// and the reference models (the * and + operators) are this testbench's own.
module compressor_n_2_tb;
  int checks = 0, failures = 0;

  localparam int NUM = 7;
  localparam int SIZES  [NUM] = '{4, 6, 9, 13, 18, 24, 53};
  localparam int LEVELS [NUM] = '{2, 3, 4, 5, 6, 7, 9};
  bit done_gen [NUM];

  for (genvar g = 0; g < NUM; g++) begin : g_size
    localparam int unsigned NIN = SIZES[g];
    localparam int unsigned NL  = NIN - 3;
    logic [NIN-1:0] x;
    logic [NL-1:0]  ci, co;
    logic           sum, carry;
    compressor_n_2 #(.NIN(NIN)) dut (.x(x), .ci(ci), .sum(sum), .carry(carry), .co(co));
    initial begin
      checks++;
      if (int'(dut.LEVELS) != LEVELS[g]) begin
        failures++;
        $display("FAIL %0d:2 has %0d levels, expected %0d", NIN, dut.LEVELS, LEVELS[g]);
      end
      for (int t = 0; t < 2000; t++) begin
        if (NIN == 4) begin
          x = NIN'(t); ci = NL'(t >> NIN);
        end else if (t == 0) begin
          x = '1; ci = '1;
        end else begin
          x  = NIN'({$urandom, $urandom});
          ci = NL'({$urandom, $urandom});
        end
        #1;
        checks++;
        if (int'(sum) + 2*(int'(carry) + $countones(co)) != $countones(x) + $countones(ci)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d:2 x=%h ci=%h", NIN, x, ci);
        end
      end
      done_gen[g] = 1'b1;
    end
  end

  initial begin
    #2100;
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
