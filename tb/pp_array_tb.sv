// pp_array_tb: random and corner operands; every partial-product bit is
// compared with x[j] & y[i], and the weighted sum of all bits with x * y.
//
// Timing: Combinational DUT, one operand pair per time unit (#1).
// No ports; it ends with a TB_RESULT line and $finish, and a watchdog stops a hung run.
// The expected values and level counts come from the lecture; the stimulus
// and the reference models (the * and + operators) are this testbench's own.
module pp_array_tb;
  localparam int unsigned N = 24;
  logic [N-1:0]   x, y;
  logic [N*N-1:0] pp;
  logic [2*N-1:0] acc;
  int checks = 0, failures = 0;

  pp_array #(.N(N)) dut (.x(x), .y(y), .pp(pp));

  task automatic check();
    #1;
    acc = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        checks++;
        if (pp[i*N+j] !== (x[j] & y[i])) failures++;
        if (pp[i*N+j]) acc += (2*N)'(1) << (i + j);
      end
    checks++;
    if (acc !== (2*N)'(x) * (2*N)'(y)) begin
      failures++;
      $display("FAIL x=%h y=%h sum of pp=%h", x, y, acc);
    end
  endtask

  initial begin
    x = '1; y = '1; check();
    x = '0; y = '1; check();
    x = 24'h800001; y = 24'h000003; check();
    for (int t = 0; t < 200; t++) begin
      x = N'($urandom); y = N'($urandom);
      check();
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
