// Self-checking test of sm_tcam (small size: 64 entries of 16 ternary
// digits, 4 segments of 16 rows).  Entries are written through the write
// encoder, searches through the search-line generator, in both encodings and
// with random fuse settings.  Every search result (hit, lowest matching
// logical entry, multiple-match flag, tag) is compared with a reference
// ternary search, and the result must appear exactly three clocks after the
// search.  It also checks the read port, that stage-2 search lines stay off
// when no stage-1 row matches, and that consecutive all-matching searches
// cause no stage-2 match-line discharge (no overall match-line reset).
module tb_sm_tcam;
  localparam int ENTRIES = 64, PAIRS = 8, SEG = 16, SEGS = ENTRIES / SEG;
  localparam int KW = 2 * PAIRS;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic enc;
  logic [3:0] fail_row [SEGS];
  logic       fail_vld [SEGS];
  logic       prog_done;
  logic wr_en, wr_valid, rd_en, srch_en, rd_valid;
  logic [5:0] wr_addr, rd_addr;
  logic [KW-1:0] wval, wcare, key;
  logic [4*PAIRS-1:0] wcells, sl, rd_cells;
  logic [15:0] tag_in, res_tag;
  logic res_vld, res_hit, res_multi, sl2_active;
  logic [5:0] res_addr;
  logic [7:0] ml2_dis_cnt;

  tcam_store_enc #(.PAIRS(PAIRS)) u_enc (.enc_mode(enc), .value(wval), .care(wcare), .cells(wcells));
  tcam_sl_gen    #(.PAIRS(PAIRS)) u_sl  (.enc_mode(enc), .key(key), .byte_care('1), .sl(sl));

  sm_tcam #(.ENTRIES(ENTRIES), .PAIRS(PAIRS), .S1_PAIRS(4), .SEG_ROWS(SEG), .SPARES(2)) dut (
    .clk(clk), .rst_n(rst_n), .fail_row(fail_row), .fail_vld(fail_vld), .prog_done(prog_done),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_cells(wcells), .wr_valid(wr_valid),
    .rd_en(rd_en), .rd_addr(rd_addr), .rd_cells(rd_cells), .rd_valid(rd_valid),
    .srch_en(srch_en), .sl(sl), .tag_in(tag_in),
    .res_vld(res_vld), .res_hit(res_hit), .res_multi(res_multi), .res_addr(res_addr),
    .res_tag(res_tag), .sl2_active(sl2_active), .ml2_dis_cnt(ml2_dis_cnt));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference table
  logic [KW-1:0] rv [ENTRIES], rc [ENTRIES];
  bit            rvld [ENTRIES];

  typedef struct { bit hit; bit multi; int addr; int tag; } exp_t;
  exp_t expq[$];
  int issued_cyc[$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic exp_t ref_search(logic [KW-1:0] k, int tag);
    exp_t e; int cnt = 0;
    e.hit = 0; e.multi = 0; e.addr = 0; e.tag = tag;
    for (int a = ENTRIES - 1; a >= 0; a--)
      if (rvld[a] && (((k ^ rv[a]) & rc[a]) == '0)) begin e.addr = a; cnt++; end
    e.hit = cnt > 0; e.multi = cnt > 1;
    return e;
  endfunction

  // result checker
  always @(posedge clk) begin
    if (rst_n && res_vld) begin
      exp_t e;
      if (expq.size() == 0) check(0, "unexpected result");
      else begin
        e = expq.pop_front();
        check(cyc - issued_cyc.pop_front() == 3, "latency 3 clocks");
        check(res_hit == e.hit, $sformatf("hit tag %0d", e.tag));
        check(res_multi == e.multi, $sformatf("multi tag %0d", e.tag));
        check(int'(res_tag) == e.tag, "tag");
        if (e.hit) check(int'(res_addr) == e.addr, $sformatf("addr %0d expected %0d", res_addr, e.addr));
      end
    end
  end

  task automatic write(int a, logic [KW-1:0] v, logic [KW-1:0] c, bit vl);
    @(negedge clk);
    wr_en = 1; wr_addr = 6'(a); wval = v; wcare = c; wr_valid = vl;
    rv[a] = v; rc[a] = c; rvld[a] = vl;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic search(logic [KW-1:0] k, int tag);
    @(negedge clk);
    srch_en = 1; key = k; tag_in = 16'(tag);
    expq.push_back(ref_search(k, tag));
    issued_cyc.push_back(cyc + 1);
  endtask

  int tagn = 0;
  initial begin
    wr_en = 0; rd_en = 0; srch_en = 0; key = '0; tag_in = 0; enc = 0; wval = 0; wcare = 0;
    wr_valid = 0; wr_addr = 0; rd_addr = 0;
    for (int cfg = 0; cfg < 4; cfg++) begin
      enc = cfg[0];
      for (int s = 0; s < SEGS; s++) begin
        fail_row[s] = 4'($urandom);
        fail_vld[s] = (cfg >= 2) ? 1'($urandom) : 1'b0;
      end
      for (int a = 0; a < ENTRIES; a++) rvld[a] = 0;
      rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
      wait (prog_done);
      // fill the table: random ternary entries, a few all-don't-care ones
      for (int a = 0; a < ENTRIES; a++) begin
        logic [KW-1:0] c;
        c = 16'($urandom) | 16'($urandom) | 16'($urandom);
        if ($urandom % 10 == 0) c = '0;
        write(a, 16'($urandom), c, ($urandom % 8) != 0);
      end
      // read back two entries
      for (int n = 0; n < 4; n++) begin
        int a;
        a = $urandom % ENTRIES;
        wval = rv[a]; wcare = rc[a];
        @(negedge clk); rd_en = 1; rd_addr = 6'(a);
        @(negedge clk); rd_en = 0;
        check(rd_valid == rvld[a], "read valid");
        if (rvld[a]) check(rd_cells == wcells, "read cells");
      end
      // back-to-back searches
      for (int n = 0; n < 300; n++) begin
        logic [KW-1:0] k;
        k = ($urandom % 2) ? rv[$urandom % ENTRIES] : 16'($urandom);
        search(k, tagn++);
      end
      @(negedge clk); srch_en = 0;
      repeat (6) @(posedge clk);
    end
    // activity: all rows don't-care -> every search matches everywhere
    for (int a = 0; a < ENTRIES; a++) write(a, '0, '0, 1);
    for (int n = 0; n < 5; n++) search(16'($urandom), tagn++);
    @(negedge clk); srch_en = 0;
    repeat (1) @(posedge clk); #1;
    check(sl2_active, "stage 2 active on matches");
    check(ml2_dis_cnt == 0, "100% match: no stage-2 ML discharge");
    repeat (4) @(posedge clk);
    // stage-1 part never matches -> stage-2 search lines stay off
    for (int a = 0; a < ENTRIES; a++) write(a, 16'h00AA, 16'h00FF, 1);
    for (int n = 0; n < 3; n++) search(16'h0055 | (16'($urandom) & 16'hFF00), tagn++);
    @(negedge clk); srch_en = 0;
    repeat (1) @(posedge clk); #1;
    check(!sl2_active, "0% stage-1 match: stage-2 SLs off");
    repeat (6) @(posedge clk);
    check(expq.size() == 0, "all results seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
