// Self-checking test of red_hw_shift: after reset the programming circuit
// must finish within SEG_ROWS+1 clocks; then each logical match line must
// come from physical row seg*(SEG+2)+row, or +2 at/above the failed row.
// One-hot and random physical match vectors are checked.
module tb_red_hw_shift;
  localparam int ENTRIES = 64, SEG = 16, SEGS = ENTRIES / SEG, PHYS = SEGS * (SEG + 2);
  int checks = 0, failures = 0;
  logic clk = 0, rst_n;
  logic [3:0] fail_row [SEGS];
  logic       fail_vld [SEGS];
  logic       prog_done;
  logic [PHYS-1:0]    phys_ml;
  logic [ENTRIES-1:0] log_ml, exp_ml;

  always #5 clk = ~clk;

  red_hw_shift #(.ENTRIES(ENTRIES), .SEG_ROWS(SEG), .SPARES(2)) dut (
    .clk(clk), .rst_n(rst_n), .fail_row(fail_row), .fail_vld(fail_vld),
    .prog_done(prog_done), .phys_ml(phys_ml), .log_ml(log_ml));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int pmap(int a);
    int s = a / SEG, l = a % SEG, e;
    e = s * (SEG + 2) + l;
    if (fail_vld[s] && l >= int'(fail_row[s])) e += 2;
    return e;
  endfunction

  initial begin
    phys_ml = '0;
    for (int cfg = 0; cfg < 6; cfg++) begin
      int cyc;
      for (int s = 0; s < SEGS; s++) begin
        fail_row[s] = (cfg == 1) ? 4'd0 : 4'($urandom);
        fail_vld[s] = (cfg == 0) ? 1'b0 : ((cfg == 1) ? 1'b1 : 1'($urandom));
      end
      rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
      cyc = 0;
      @(posedge clk); #1;
      while (!prog_done && cyc < 100) begin @(posedge clk); #1; cyc++; end
      check(prog_done, "programming finished");
      check(cyc <= SEG + 1, $sformatf("programming took %0d clocks", cyc));
      for (int a = 0; a < ENTRIES; a++) begin
        phys_ml = '0; phys_ml[pmap(a)] = 1'b1; #1;
        check(log_ml == (ENTRIES'(1) << a), $sformatf("cfg %0d logical %0d", cfg, a));
      end
      for (int n = 0; n < 50; n++) begin
        phys_ml = {$urandom, $urandom, $urandom};
        for (int a = 0; a < ENTRIES; a++) exp_ml[a] = phys_ml[pmap(a)];
        #1;
        check(log_ml == exp_ml, "random match vector");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
