// tdm_multiplier_tb: 24 x 24 multiply-add P = X*Y + Z at the default size.
// Corner operands (all ones, zeros, single bits) and random operands are
// compared with X*Y + Z formed by the * and + operators.  A second, 8-bit
// instance is checked exhaustively over X and Y with random Z.
//
// Timing: Combinational DUTs, one operand set per time unit (#1).
// No ports; it ends with a TB_RESULT line and $finish, and a watchdog stops a hung run.
// The expected values and level counts come from the lecture; the stimulus
// and the reference models (the * and + operators) are this testbench's own.
module tdm_multiplier_tb;
  localparam int unsigned N = 24;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] z;
  logic [2*N:0]   p, expected;
  int checks = 0, failures = 0;

  tdm_multiplier dut (.x(x), .y(y), .z(z), .p(p));

  logic [7:0]  sx, sy;
  logic [15:0] sz;
  logic [16:0] sp;
  tdm_multiplier #(.N(8)) dut8 (.x(sx), .y(sy), .z(sz), .p(sp));

  task automatic check();
    #1;
    expected = (2*N+1)'(x) * (2*N+1)'(y) + (2*N+1)'(z);
    checks++;
    if (p !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h y=%h z=%h -> %h expected %h", x, y, z, p, expected);
    end
  endtask

  initial begin
    x = '1; y = '1; z = '1; check();
    x = '1; y = '1; z = '0; check();
    x = '0; y = '0; z = '1; check();
    x = 24'h800000; y = 24'h800000; z = 48'h1; check();
    for (int i = 0; i < N; i++) begin
      x = N'(1) << i; y = '1; z = '1; check();
    end
    for (int t = 0; t < 5000; t++) begin
      x = N'($urandom); y = N'($urandom); z = {$urandom, $urandom};
      check();
    end
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        sx = 8'(a); sy = 8'(b); sz = 16'($urandom);
        #1;
        checks++;
        if (sp !== 17'(a * b) + 17'(sz)) begin
          failures++;
          if (failures < 10) $display("FAIL N=8 %0d*%0d+%0d -> %0d", a, b, sz, sp);
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
