// Self-checking test of bcam: random writes and invalidations, then searches
// with stored and random keys; the match vector (one clock after the search)
// is compared with a reference table.
module tb_bcam;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  logic we, wvalid, srch, mvld;
  logic [3:0] waddr;
  logic [11:0] wdata, key;
  logic [15:0] match, expm;
  logic [11:0] rm [16];
  bit rv [16];

  bcam dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata), .wvalid(wvalid),
            .srch(srch), .key(key), .mvld(mvld), .match(match));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; srch = 0; key = 0; waddr = 0; wdata = 0; wvalid = 0;
    for (int i = 0; i < 16; i++) rv[i] = 0;
    rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
    @(negedge clk); srch = 1; key = 12'h000;
    @(negedge clk); srch = 0;
    check(mvld && match == '0, "empty after reset");
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1; waddr = 4'($urandom); wdata = 12'($urandom % 8); wvalid = ($urandom % 4) != 0;
      rm[waddr] = wdata; rv[waddr] = wvalid;
      @(negedge clk); we = 0;
      srch = 1; key = 12'($urandom % 9);
      for (int i = 0; i < 16; i++) expm[i] = rv[i] && rm[i] == key;
      @(negedge clk); srch = 0;
      check(mvld, "match valid one clock after search");
      check(match == expm, $sformatf("match %h expected %h", match, expm));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
