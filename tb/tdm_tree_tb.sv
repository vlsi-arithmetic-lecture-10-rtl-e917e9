// tdm_tree_tb: checks the TDM reduction tree.
//
// For every word length of the published TDM delay comparison up to 32
// bits (3, 4, 6, 8, 9, 11, 12, 16, 19, 24, 32) a tree without addend is built
// and
//   * its two output rows must add up to x * y for corner and random operands
//     (the reference product is formed with the * operator, independently of
//     the tree);
//   * its critical path, MAX_DELAY in half-XOR units rounded up to whole XOR
//     delays, must not exceed the published TDM figure for that length, and
//     must equal it for all lengths except 6 bits (where this wiring rule
//     gives 4 XOR delays against the published 5).
// A 24-bit tree with addend must give rows that add up to x * y + z, with a
// critical path no longer than the tree without addend (multiply-add in the
// time of a multiply).
//
// Timing: Combinational DUTs, one operand pair per time unit (#1).
// No ports; it ends with a TB_RESULT line and $finish, and a watchdog stops a hung run.
// The expected values and level counts come from the lecture; the stimulus
// and the reference models (the * and + operators) are this testbench's own.
module tdm_tree_tb;
  int checks = 0, failures = 0;

  localparam int NUM = 11;
  localparam int I24 = 9;                                // index of N = 24
  localparam int SIZES  [NUM] = '{3, 4, 6, 8, 9, 11, 12, 16, 19, 24, 32};
  localparam int TABLE  [NUM] = '{2, 3, 5, 5, 6, 7, 7, 8, 9, 10, 11};   // XOR levels
  localparam bit EXACT  [NUM] = '{1, 1, 0, 1, 1, 1, 1, 1, 1, 1, 1};

  int max_delay [NUM];
  int plain_24_delay;
  int add_24_delay;
  int fails_in_gen [NUM];
  bit done_gen [NUM];

  for (genvar g = 0; g < NUM; g++) begin : g_size
    localparam int unsigned N = SIZES[g];
    logic [N-1:0]   x, y;
    logic [N*N-1:0] pp;
    logic [2*N-1:0] ra, rb;
    tdm_tree #(.N(N), .ADDEND(1'b0)) dut (.pp(pp), .z('0), .row_a(ra), .row_b(rb));
    always_comb
      for (int i = 0; i < int'(N); i++)
        for (int j = 0; j < int'(N); j++)
          pp[i*N + j] = x[j] & y[i];
    initial begin
      max_delay[g] = int'(dut.MAX_DELAY);
      fails_in_gen[g] = 0;
      for (int t = 0; t < 400; t++) begin
        case (t)
          0: begin x = '1; y = '1; end
          1: begin x = '0; y = '1; end
          2: begin x = '1; y = N'(1); end
          default: begin
            x = N'({$urandom, $urandom});
            y = N'({$urandom, $urandom});
          end
        endcase
        #1;
        checks++;
        if (ra + rb !== (2*N)'(x) * (2*N)'(y)) begin
          failures++;
          fails_in_gen[g]++;
          if (fails_in_gen[g] < 4)
            $display("FAIL N=%0d x=%h y=%h rows %h + %h", N, x, y, ra, rb);
        end
      end
      done_gen[g] = 1'b1;
    end
  end

  // 24-bit tree with the addend injected
  localparam int unsigned NA = 24;
  logic [NA-1:0]    ax, ay;
  logic [2*NA-1:0]  az;
  logic [NA*NA-1:0] app;
  logic [2*NA:0]    ara, arb;
  tdm_tree #(.N(NA), .ADDEND(1'b1)) dut_add (.pp(app), .z(az), .row_a(ara), .row_b(arb));
  always_comb
    for (int i = 0; i < int'(NA); i++)
      for (int j = 0; j < int'(NA); j++)
        app[i*NA + j] = ax[j] & ay[i];

  initial begin
    add_24_delay = int'(dut_add.MAX_DELAY);
    for (int t = 0; t < 400; t++) begin
      if (t == 0) begin ax = '1; ay = '1; az = '1; end
      else begin
        ax = NA'($urandom); ay = NA'($urandom); az = {$urandom, $urandom};
      end
      #1;
      checks++;
      if (ara + arb !== (2*NA+1)'(ax) * (2*NA+1)'(ay) + (2*NA+1)'(az)) begin
        failures++;
        $display("FAIL addend x=%h y=%h z=%h", ax, ay, az);
      end
    end
    #10;
    for (int g = 0; g < NUM; g++) begin
      checks++;
      if (!done_gen[g]) failures++;
      $display("N=%0d: critical path %0d half-XOR = %0d XOR (published TDM %0d)",
               SIZES[g], max_delay[g], (max_delay[g] + 1) / 2, TABLE[g]);
      checks++;
      if ((max_delay[g] + 1) / 2 > TABLE[g] ||
          (EXACT[g] && (max_delay[g] + 1) / 2 != TABLE[g])) begin
        failures++;
        $display("FAIL delay of N=%0d", SIZES[g]);
      end
    end
    plain_24_delay = max_delay[I24];
    $display("N=24 with addend: %0d half-XOR, without: %0d", add_24_delay, plain_24_delay);
    checks++;
    if (add_24_delay > plain_24_delay) begin
      failures++;
      $display("FAIL addend lengthens the critical path");
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
