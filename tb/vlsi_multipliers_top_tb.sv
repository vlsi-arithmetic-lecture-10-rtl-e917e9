// vlsi_multipliers_top_tb: end-to-end test of the whole collection at its
// default sizes (24-bit TDM, Wallace, 4:2, 9:2, 24:2 and Dadda units, 6-bit
// sequential unit).
//
// Every cycle new random operands go to the six parallel units and their
// results are compared with x*y (+z) formed by the * and + operators; the
// sequential unit runs back-to-back multiplications alongside, each checked
// for its product and its 6-cycle latency.  The testbench also counts how
// often each mechanism of the design was exercised and fails if one never
// was:
//   * multiply-add with a non-zero addend in the TDM unit,
//   * the carry-skip path of the hybrid final adder (a carry entering a skip
//     block whose bits all propagate),
//   * the carry-select region taking its carry-in-one sum,
//   * lateral carries in the 4:2, 9:2 and 24:2 compressor rows,
//   * completed sequential multiplications.
//
// Timing: The sequential unit is clocked; inputs change away from its active edge.
// No ports; it ends with a TB_RESULT line and $finish, and a watchdog stops a hung run.
// The expected values and level counts come from the lecture; the stimulus
// and the reference models (the * and + operators) are this testbench's own.
module vlsi_multipliers_top_tb;
  localparam int unsigned N  = 24;
  localparam int unsigned SN = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]    tdm_x, tdm_y, wal_x, wal_y, c42_x, c42_y, c92_x, c92_y, dad_x, dad_y, c242_x, c242_y;
  logic [2*N-1:0]  tdm_z, wal_p, c42_p, c92_p, dad_p, c242_p;
  logic [2*N:0]    tdm_p;
  logic            seq_start, seq_busy, seq_done;
  logic [SN-1:0]   seq_x, seq_y;
  logic [2*SN-1:0] seq_p;

  vlsi_multipliers_top dut (.*);

  int checks = 0, failures = 0;
  int n_lat242 = 0;
  int n_mac = 0, n_skip = 0, n_sel1 = 0, n_lat42 = 0, n_lat92 = 0, n_seq = 0;
  int seq_cycles = 0;
  logic [SN-1:0] seq_ax, seq_ay;

  // Event monitors, sampled when the combinational units have settled
  task automatic count_events();
    logic [2*N+1:0] s, cin;
    s   = {1'b0, dut.u_tdm.row_a} + {1'b0, dut.u_tdm.row_b};
    cin = s ^ {1'b0, dut.u_tdm.row_a} ^ {1'b0, dut.u_tdm.row_b};
    if (tdm_z != '0) n_mac++;
    for (int k = 0; k < 4; k++)
      if (cin[16 + 4*k] && ((dut.u_tdm.row_a[16+4*k +: 4] ^ dut.u_tdm.row_b[16+4*k +: 4]) == 4'hF))
        n_skip++;
    if (cin[32]) n_sel1++;
    if (|dut.u_c42.g_level[0].g_grp[0].g_comp.u_row.g_k4.lat) n_lat42++;
    for (int j = 0; j <= 2*N; j++)
      if (|dut.u_c92.g_level[0].g_grp[0].g_comp.u_row.g_k9.lat[j]) begin
        n_lat92++;
        break;
      end
    if (|dut.u_c242.g_level[0].g_grp[0].g_comp.u_row.g_kn.g_bit[30].u_cn2.co) n_lat242++;
  endtask

  initial begin
    seq_start = 1'b0; seq_x = '0; seq_y = '0;
    tdm_x = '0; tdm_y = '0; tdm_z = '0;
    wal_x = '0; wal_y = '0; c42_x = '0; c42_y = '0; c92_x = '0; c92_y = '0; dad_x = '0; dad_y = '0; c242_x = '0; c242_y = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      tdm_x = N'($urandom); tdm_y = N'($urandom);
      tdm_z = (t % 4 == 0) ? '0 : {$urandom, $urandom};
      if (t == 1) begin tdm_x = '1; tdm_y = '1; tdm_z = '1; end
      if (t % 5 == 2) tdm_y = '1;
      wal_x = N'($urandom); wal_y = N'($urandom);
      c42_x = N'($urandom); c42_y = N'($urandom);
      c92_x = N'($urandom); c92_y = N'($urandom);
      dad_x = N'($urandom); dad_y = N'($urandom);
      c242_x = N'($urandom); c242_y = N'($urandom);
      if (t == 3) begin dad_x = '1; dad_y = '1; end
      // sequential unit: check a finished multiplication, then start the next
      // one whenever the unit is idle
      seq_cycles++;
      if (seq_done) begin
        n_seq++;
        checks += 2;
        if (seq_p !== (2*SN)'(seq_ax) * (2*SN)'(seq_ay)) begin
          failures++; $display("FAIL seq %0d*%0d -> %0d", seq_ax, seq_ay, seq_p);
        end
        // start at negedge k, accepted at the next posedge, SN steps, done
        // seen at negedge k + SN + 1
        if (seq_cycles != SN + 1) begin
          failures++; $display("FAIL seq latency %0d", seq_cycles);
        end
      end
      if (!seq_busy && !seq_start) begin
        seq_ax = SN'($urandom); seq_ay = SN'($urandom);
        seq_x = seq_ax; seq_y = seq_ay; seq_start = 1'b1;
        seq_cycles = 0;
      end else begin
        seq_start = 1'b0;
      end
      #1;
      count_events();
      checks += 6;
      if (tdm_p !== (2*N+1)'(tdm_x) * (2*N+1)'(tdm_y) + (2*N+1)'(tdm_z)) begin
        failures++; $display("FAIL tdm %h*%h+%h -> %h", tdm_x, tdm_y, tdm_z, tdm_p);
      end
      if (wal_p !== (2*N)'(wal_x) * (2*N)'(wal_y)) begin
        failures++; $display("FAIL wallace %h*%h -> %h", wal_x, wal_y, wal_p);
      end
      if (c42_p !== (2*N)'(c42_x) * (2*N)'(c42_y)) begin
        failures++; $display("FAIL 4:2 %h*%h -> %h", c42_x, c42_y, c42_p);
      end
      if (c92_p !== (2*N)'(c92_x) * (2*N)'(c92_y)) begin
        failures++; $display("FAIL 9:2 %h*%h -> %h", c92_x, c92_y, c92_p);
      end
      if (c242_p !== (2*N)'(c242_x) * (2*N)'(c242_y)) begin
        failures++; $display("FAIL 24:2 %h*%h -> %h", c242_x, c242_y, c242_p);
      end
      if (dad_p !== (2*N)'(dad_x) * (2*N)'(dad_y)) begin
        failures++; $display("FAIL dadda %h*%h -> %h", dad_x, dad_y, dad_p);
      end
    end
    $display("events: multiply-add %0d, carry-skip %0d, carry-select-1 %0d, 4:2 lateral %0d, 9:2 lateral %0d, 24:2 lateral %0d, sequential %0d",
             n_mac, n_skip, n_sel1, n_lat42, n_lat92, n_lat242, n_seq);
    checks += 7;
    if (n_lat242 == 0) begin failures++; $display("FAIL no 24:2 lateral carry"); end
    if (n_mac == 0)   begin failures++; $display("FAIL no multiply-add"); end
    if (n_skip == 0)  begin failures++; $display("FAIL no carry skip"); end
    if (n_sel1 == 0)  begin failures++; $display("FAIL no carry select"); end
    if (n_lat42 == 0) begin failures++; $display("FAIL no 4:2 lateral carry"); end
    if (n_lat92 == 0) begin failures++; $display("FAIL no 9:2 lateral carry"); end
    if (n_seq == 0)   begin failures++; $display("FAIL no sequential result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
