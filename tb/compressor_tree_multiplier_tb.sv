// compressor_tree_multiplier_tb: 24 x 24 multipliers with a Wallace (3:2),
// a 4:2 and a 9:2 compressor tree, and with one row of 24:2 compressors.
// Each product is compared with x * y, and the number of tree levels with
// the count expected for 24 rows: 7 for the Wallace tree (the minimum stage
// count for 19 < N <= 28), 4 for the 4:2 tree, 2 for the 9:2 tree and 1 for
// the 24:2 row.  Small 5-bit instances are checked exhaustively.
//
// Timing: Combinational DUTs, one operand pair per time unit (#1).
// No ports; it ends with a TB_RESULT line and $finish, and a watchdog stops a hung run.
// The expected values and level counts come from the lecture; the stimulus
// and the reference models (the * and + operators) are this testbench's own.
module compressor_tree_multiplier_tb;
  localparam int unsigned N = 24;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] p3, p4, p9, expected;
  int checks = 0, failures = 0;

  compressor_tree_multiplier #(.N(N), .K(3)) dut3 (.x(x), .y(y), .p(p3));
  compressor_tree_multiplier #(.N(N), .K(4)) dut4 (.x(x), .y(y), .p(p4));
  compressor_tree_multiplier #(.N(N), .K(9)) dut9 (.x(x), .y(y), .p(p9));
  logic [2*N-1:0] p24;
  compressor_tree_multiplier #(.N(N), .K(24)) dut24 (.x(x), .y(y), .p(p24));

  logic [4:0] sx, sy;
  logic [9:0] sp3, sp4, sp9;
  compressor_tree_multiplier #(.N(5), .K(3)) s3 (.x(sx), .y(sy), .p(sp3));
  compressor_tree_multiplier #(.N(5), .K(4)) s4 (.x(sx), .y(sy), .p(sp4));
  compressor_tree_multiplier #(.N(5), .K(9)) s9 (.x(sx), .y(sy), .p(sp9));

  task automatic check();
    #1;
    expected = (2*N)'(x) * (2*N)'(y);
    checks += 4;
    if (p24 !== expected) begin failures++; $display("FAIL 24:2 x=%h y=%h -> %h", x, y, p24); end
    if (p3 !== expected) begin failures++; $display("FAIL 3:2 x=%h y=%h -> %h", x, y, p3); end
    if (p4 !== expected) begin failures++; $display("FAIL 4:2 x=%h y=%h -> %h", x, y, p4); end
    if (p9 !== expected) begin failures++; $display("FAIL 9:2 x=%h y=%h -> %h", x, y, p9); end
  endtask

  initial begin
    checks += 3;
    if (dut3.LEVELS != 7) begin failures++; $display("FAIL Wallace levels %0d", dut3.LEVELS); end
    if (dut4.LEVELS != 4) begin failures++; $display("FAIL 4:2 levels %0d", dut4.LEVELS); end
    if (dut9.LEVELS != 2) begin failures++; $display("FAIL 9:2 levels %0d", dut9.LEVELS); end
    checks++;
    if (dut24.LEVELS != 1) begin failures++; $display("FAIL 24:2 levels %0d", dut24.LEVELS); end
    x = '1; y = '1; check();
    x = '0; y = '1; check();
    x = 24'h800001; y = 24'hFFFFFF; check();
    for (int t = 0; t < 3000; t++) begin
      x = N'($urandom); y = N'($urandom);
      check();
    end
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) begin
        sx = 5'(a); sy = 5'(b);
        #1;
        checks += 3;
        if (sp3 !== 10'(a*b)) failures++;
        if (sp4 !== 10'(a*b)) failures++;
        if (sp9 !== 10'(a*b)) failures++;
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
