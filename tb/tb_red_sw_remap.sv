// Self-checking test of red_sw_remap: for every logical address and several
// fuse settings, the physical row must be seg*(SEG+2)+row, plus 2 at or above
// the failed row of a repaired segment; the mapping must keep the order of
// addresses and never hit a failed row pair.
module tb_red_sw_remap;
  localparam int ENTRIES = 64, SEG = 16, SEGS = ENTRIES / SEG;
  int checks = 0, failures = 0;
  logic [5:0] laddr;
  logic [3:0] fail_row [SEGS];
  logic       fail_vld [SEGS];
  logic [6:0] paddr;

  red_sw_remap #(.ENTRIES(ENTRIES), .SEG_ROWS(SEG), .SPARES(2)) dut (
    .laddr(laddr), .fail_row(fail_row), .fail_vld(fail_vld), .paddr(paddr));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int cfg = 0; cfg < 20; cfg++) begin
      int prev;
      for (int s = 0; s < SEGS; s++) begin
        fail_row[s] = 4'($urandom);
        fail_vld[s] = (cfg == 0) ? 1'b0 : 1'($urandom);
      end
      prev = -1;
      for (int a = 0; a < ENTRIES; a++) begin
        int s, l, e;
        laddr = 6'(a); #1;
        s = a / SEG; l = a % SEG;
        e = s * (SEG + 2) + l;
        if (fail_vld[s] && l >= int'(fail_row[s])) e += 2;
        check(int'(paddr) == e, $sformatf("addr %0d -> %0d expected %0d", a, paddr, e));
        check(int'(paddr) > prev, "order kept");
        if (fail_vld[s])
          check(int'(paddr) != s*(SEG+2) + int'(fail_row[s]) &&
                int'(paddr) != s*(SEG+2) + int'(fail_row[s]) + 1, "failed pair skipped");
        prev = int'(paddr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
