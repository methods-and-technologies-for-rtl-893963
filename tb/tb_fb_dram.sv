// Self-checking test of fb_dram (4 banks x 16 rows x 20 blocks):
// random block writes and reads against a reference model, read data one
// clock after the request, concurrent read and write in one cycle, and DUP
// copying each bank's open page into consecutive rows at one row per clock.
module tb_fb_dram;
  localparam int BANKS = 4, ROWS = 16, PB = 20;
  int checks, failures;
  logic clk = 0, rst_n = 0;
  logic rd_en = 0, wr_en = 0, rsp_vld, dup_start = 0, dup_busy, dup_ev;
  logic [2+4+5-1:0] rd_blk, wr_blk;
  logic [511:0] wr_data, rd_data;
  logic [3:0] dup_row0;
  logic [4:0] dup_rows;
  logic [511:0] ref_m [BANKS][ROWS][PB];
  logic [3:0] open_row [BANKS];
  fb_dram #(.BANKS(BANKS), .ROWS(ROWS), .PAGE_BLKS(PB)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [511:0] rnd512();
    logic [511:0] v;
    for (int i = 0; i < 16; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int b, r, c, wb, wr_, wc, cycles;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill everything
    for (b = 0; b < BANKS; b++) for (r = 0; r < ROWS; r++) for (c = 0; c < PB; c++) begin
      @(negedge clk);
      wr_en = 1; wr_blk = {2'(b), 4'(r), 5'(c)}; wr_data = rnd512();
      ref_m[b][r][c] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    // random concurrent read + write
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      b = $urandom % BANKS; r = $urandom % ROWS; c = $urandom % PB;
      wb = $urandom % BANKS; wr_ = $urandom % ROWS; wc = $urandom % PB;
      if (wb == b && wr_ == r && wc == c) wc = (wc + 1) % PB;
      rd_en = 1; rd_blk = {2'(b), 4'(r), 5'(c)};
      wr_en = ($urandom % 2); wr_blk = {2'(wb), 4'(wr_), 5'(wc)}; wr_data = rnd512();
      @(negedge clk);
      check(rsp_vld, "rsp_vld one clock after the request");
      check(rd_data == ref_m[b][r][c], $sformatf("read %0d/%0d/%0d", b, r, c));
      if (wr_en) ref_m[wb][wr_][wc] = wr_data;
      rd_en = 0; wr_en = 0;
    end
    // open row 3 of every bank by reading it, then DUP into rows 5..12
    for (b = 0; b < BANKS; b++) begin
      @(negedge clk); rd_en = 1; rd_blk = {2'(b), 4'd3, 5'd0};
    end
    @(negedge clk); rd_en = 0;
    dup_row0 = 5; dup_rows = 8; dup_start = 1;
    @(negedge clk); dup_start = 0;
    cycles = 0;
    while (dup_busy) begin
      check(dup_ev, "dup_ev while busy");
      @(negedge clk); cycles++;
    end
    check(cycles == 8, $sformatf("DUP of 8 rows took %0d clocks", cycles));
    for (b = 0; b < BANKS; b++) for (r = 5; r < 13; r++) for (c = 0; c < PB; c++)
      ref_m[b][r][c] = ref_m[b][3][c];
    for (b = 0; b < BANKS; b++) for (r = 0; r < ROWS; r++) for (c = 0; c < PB; c++) begin
      @(negedge clk); rd_en = 1; rd_blk = {2'(b), 4'(r), 5'(c)};
      @(negedge clk); rd_en = 0;
      check(rd_data == ref_m[b][r][c], $sformatf("after DUP %0d/%0d/%0d", b, r, c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
