// seq_multiplier_tb: the 6-bit radix-2 sequential multiplier over all 4096
// operand pairs, and an 8-bit radix-4 instance on random operands.  Each
// product is compared with x * y, and the time from the start cycle to the
// done pulse must be exactly n = N / log2(r) cycles (6 and 4).
//
// Timing: Clocked DUTs; inputs change away from the active clock edge.
// No ports; it ends with a TB_RESULT line and $finish, and a watchdog stops a hung run.
// The expected values and level counts come from the lecture; the stimulus
// and the reference models (the * and + operators) are this testbench's own.
module seq_multiplier_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start;
  logic [5:0]  x, y;
  logic        busy, done;
  logic [11:0] p;
  seq_multiplier dut (.clk(clk), .rst_n(rst_n), .start(start), .x(x), .y(y),
                      .busy(busy), .done(done), .p(p));

  logic        start4;
  logic [7:0]  x4, y4;
  logic        busy4, done4;
  logic [15:0] p4;
  seq_multiplier #(.N(8), .LOG2R(2)) dut4 (.clk(clk), .rst_n(rst_n), .start(start4),
                      .x(x4), .y(y4), .busy(busy4), .done(done4), .p(p4));

  int checks = 0, failures = 0;
  int cycles;

  initial begin
    start = 1'b0; x = '0; y = '0;
    start4 = 1'b0; x4 = '0; y4 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 64; b++) begin
        @(negedge clk);
        x = 6'(a); y = 6'(b); start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        x = 6'($urandom); y = 6'($urandom);   // inputs are not held
        cycles = 1;
        while (!done) begin
          @(negedge clk);
          cycles++;
        end
        checks++;
        if (p !== 12'(a * b)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d -> %0d", a, b, p);
        end
        checks++;
        if (cycles != 6 + 1) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d cycles", cycles - 1);
        end
      end
    for (int t = 0; t < 300; t++) begin
      automatic logic [7:0] a = 8'($urandom), b = 8'($urandom);
      @(negedge clk);
      x4 = a; y4 = b; start4 = 1'b1;
      @(negedge clk);
      start4 = 1'b0;
      cycles = 1;
      while (!done4) begin
        @(negedge clk);
        cycles++;
      end
      checks += 2;
      if (p4 !== 16'(a) * 16'(b)) begin
        failures++;
        if (failures < 10) $display("FAIL radix-4 %0d*%0d -> %0d", a, b, p4);
      end
      if (cycles != 4 + 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
