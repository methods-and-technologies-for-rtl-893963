// End-to-end test of tcam18_top with 16 banks of 32 rows: the banks are
// partitioned into tables by their DX entries, filled with random ternary
// rows, and searched with random table IDs and keys in 72- and 144-bit
// modes.  Each result must arrive three clocks after its search with the
// lowest matching address among the banks whose DX matches the ID, and
// banks_on must equal the number of such banks.  A final part checks that an
// entry in a bank outside the table is not reported, and runs the aging
// lookup/query sequence.
module tb_tcam18_top;
  localparam int BANKS = 16, ROWS = 32, W = 72;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  logic aging_en, dx_we, wr_en, wr_vacant, srch, age_query, res_vld, res_hit;
  logic [1:0] wmode; logic [3:0] dx_bank, dx_value, dx_care, srch_id;
  logic [8:0] wr_addr, res_addr; logic [W-1:0] wr_value, wr_care;
  logic [8*W-1:0] key, kcare; logic [4:0] banks_on;

  tcam18_top #(.BANKS(BANKS), .ROWS(ROWS)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [W-1:0] rv [BANKS*ROWS], rc [BANKS*ROWS];
  logic [3:0] dv [BANKS], dc [BANKS];

  typedef struct { int due; bit hit; int addr; int on; } exp_t;
  exp_t q[$];
  int cyc = 0;
  bit manual = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && res_vld && !manual) begin
      exp_t e;
      if (q.size() == 0) check(0, "unexpected result");
      else begin
        e = q.pop_front();
        check(cyc == e.due, "latency 3");
        check(res_hit == e.hit, $sformatf("hit %0d expected %0d", res_hit, e.hit));
        if (e.hit) check(int'(res_addr) == e.addr, $sformatf("addr %0d expected %0d", res_addr, e.addr));
        check(int'(banks_on) == e.on, $sformatf("banks_on %0d expected %0d", banks_on, e.on));
      end
    end
  end

  task automatic issue(logic [3:0] id);
    exp_t e; int k;
    srch = 1; srch_id = id;
    k = 1 << wmode;
    e.due = cyc + 3; e.hit = 0; e.addr = 0; e.on = 0;
    for (int b = BANKS - 1; b >= 0; b--) begin
      if (((id ^ dv[b]) & dc[b]) != 0) continue;
      e.on++;
      for (int g = ROWS - k; g >= 0; g -= k) begin
        bit m = 1;
        for (int j = 0; j < k; j++)
          m &= (((key[j*W +: W] ^ rv[b*ROWS + g + j]) & rc[b*ROWS + g + j] & kcare[j*W +: W]) == 0);
        if (m && (!e.hit || b*ROWS + g < e.addr)) begin e.hit = 1; e.addr = b*ROWS + g; end
      end
    end
    q.push_back(e);
  endtask

  initial begin
    aging_en = 0; wmode = 0; dx_we = 0; wr_en = 0; wr_vacant = 0; srch = 0; age_query = 0;
    dx_bank = 0; dx_value = 0; dx_care = 0; srch_id = 0; wr_addr = 0; wr_value = 0; wr_care = 0;
    key = 0; kcare = 0;
    rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int b = 0; b < BANKS; b++) begin
      @(negedge clk); dx_we = 1; dx_bank = 4'(b);
      dx_value = 4'($urandom % 4); dx_care = (b % 5 == 0) ? 4'b0001 : 4'b0011;
      dv[b] = dx_value; dc[b] = dx_care;
    end
    @(negedge clk); dx_we = 0;
    for (int a = 0; a < BANKS*ROWS; a++) begin
      @(negedge clk); wr_en = 1; wr_addr = 9'(a);
      wr_value = 72'($urandom % 16); wr_care = 72'($urandom % 16);
      rv[a] = wr_value; rc[a] = wr_care;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 300; n++) begin
      if (n == 150) begin @(negedge clk); srch = 0; repeat (4) @(negedge clk); end
      wmode = (n < 150) ? 2'd0 : 2'd1;
      @(negedge clk);
      for (int s = 0; s < 8; s++) key[s*W +: W] = 72'($urandom % 16);
      kcare = {8{72'hF}};
      issue(4'($urandom % 4));
    end
    @(negedge clk); srch = 0;
    repeat (5) @(negedge clk);
    check(q.size() == 0, "all results seen");
    // aging: write to bank 3 only; an ID whose DX excludes bank 3 must miss
    aging_en = 1; wmode = 0; manual = 1;
    rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;   // DX back to all-x
    for (int b = 0; b < BANKS; b++) begin dv[b] = 0; dc[b] = 0; end
    @(negedge clk); dx_we = 1; dx_bank = 4'd3; dx_value = 4'b0101; dx_care = 4'b1111;
    @(negedge clk); dx_we = 0;
    @(negedge clk); wr_en = 1; wr_addr = 9'(3*ROWS + 5); wr_value = 72'h2; wr_care = 72'h6;
    @(negedge clk); wr_en = 1; wr_addr = 9'(3*ROWS + 9); wr_value = 72'h4; wr_care = 72'h6;
    @(negedge clk); wr_en = 0;
    key = {8{72'h2}}; kcare = {8{72'h6}};
    @(negedge clk); srch = 1; srch_id = 4'b0000;
    @(negedge clk); srch = 0; repeat (2) @(negedge clk);
    check(!res_hit && banks_on == 15, "bank outside the table is not searched");
    @(negedge clk); srch = 1; srch_id = 4'b0101;
    @(negedge clk); srch = 0; repeat (2) @(negedge clk);
    check(res_hit && res_addr == 9'(3*ROWS + 5) && banks_on == 16, "lookup hits row 5 of bank 3");
    key = '0; kcare = {8{72'h1}};
    @(negedge clk); srch = 1; srch_id = 4'b0101; age_query = 1;
    @(negedge clk); srch = 0; repeat (2) @(negedge clk);
    check(res_hit && res_addr == 9'(3*ROWS + 9), "aging query finds the never-hit row 9");
    age_query = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
