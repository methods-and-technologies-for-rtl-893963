// System test of functional_mem_top at its default parameters (the top is
// instantiated without overrides).  Directed sequences drive each design
// through its ports and count every mechanism the designs provide; the
// test fails if any of them never happened or any result is wrong.
//   signature matching: hit, multiple hit, four-clock result latency,
//     secondary hit five clocks after the primary, secondary drop while
//     busy, stage-2 search lines left off, encoded search lines, row repair
//   18 Mb TCAM: DX bank exclusion, 144-bit chained entry, aging hit flag,
//     aging query, vacant entry erase, three-clock result latency
//   frame buffer: clear by DUP, Z-pass, Z-fail, alpha blend, same-address
//     hold of seven clocks, cache miss with write-back, host read
//   filter: box filter mean, one-clock latency
module tb_functional_mem_top;
  import sm_pkg::*;
  import fb_pkg::*;

  int checks, failures;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc;
  always @(posedge clk) cyc <= cyc + 1;

  // signature matching (1024 entries, 4 repair segments)
  logic sm_cfg_enc; logic [2:0] sm_cfg_hdr_bytes; logic [5:0] sm_cfg_pay_bytes;
  logic [7:0] sm_fail_row [4]; logic sm_fail_vld [4]; logic sm_prog_done;
  logic sm_tw_en, sm_tw_valid, sm_tr_en, sm_tr_valid; logic [9:0] sm_tw_addr, sm_tr_addr;
  logic [287:0] sm_tw_value, sm_tw_care; logic [575:0] sm_tr_cells;
  logic sm_sw_en, sm_sw_vld; logic [3:0] sm_sw_idx; lop_rule_t sm_sw_rule; logic [9:0] sm_sw_addr;
  logic sm_hdr_load, sm_pkt_start, sm_byte_vld; logic [31:0] sm_hdr_in; logic [7:0] sm_byte_in;
  logic sm_res_vld, sm_res_hit, sm_res_multi; logic [9:0] sm_res_addr; logic [15:0] sm_res_ofs;
  logic sm_sec_drop, sm_sec_vld, sm_sec_hit; logic [3:0] sm_sec_idx; logic [15:0] sm_sec_ofs;
  logic sm_sl2_active; logic [10:0] sm_ml2_dis_cnt;
  // 18 Mb TCAM (16 banks x 256 rows)
  logic tc_aging_en; logic [1:0] tc_wmode;
  logic tc_dx_we; logic [3:0] tc_dx_bank, tc_dx_value, tc_dx_care;
  logic tc_wr_en, tc_wr_vacant; logic [11:0] tc_wr_addr; logic [71:0] tc_wr_value, tc_wr_care;
  logic tc_srch, tc_age_query; logic [3:0] tc_srch_id; logic [575:0] tc_key, tc_kcare;
  logic tc_res_vld, tc_res_hit; logic [11:0] tc_res_addr; logic [4:0] tc_banks_on;
  // frame buffer (4 banks x 64 rows x 20 blocks)
  alu_mode_e fb_mode; logic fb_blend_en, fb_pix_vld, fb_pix_wr, fb_pix_rdy;
  logic [15:0] fb_pix_addr; pixel_t fb_pix_in, fb_hr_pix, fb_erase_pix;
  logic fb_pass_in, fb_pass_out, fb_hr_vld, fb_erase_start, fb_erase_busy;
  logic fb_ev_zpass, fb_ev_zfail, fb_ev_hazard, fb_ev_miss, fb_ev_wb, fb_ev_dup;
  // filter
  logic flt_in_vld, flt_out_vld; logic [31:0] flt_smp [16]; logic [7:0] flt_wgt [4][16];
  logic [31:0] flt_out_pix; logic [19:0] flt_out_sum [4];

  functional_mem_top dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // mechanism counters
  int n_hit, n_multi, n_sec, n_drop, n_sl2off, n_enc_hit, n_repair_hit;
  int n_dx_excl, n_wide, n_age_hit, n_age_query, n_vacant;
  int n_zpass, n_zfail, n_blend, n_hazard, n_miss, n_wb, n_dup, n_hr, n_flt;

  // ---------------- signature matching ----------------
  typedef struct { int cyc; bit hit; bit multi; int addr; int ofs; } sres_t;
  sres_t sm_log[$];
  int sm_byte_cyc[$], sec_cyc[$], prim_hit_cyc[$];
  always @(posedge clk) if (rst_n) begin
    if (!sm_sl2_active) n_sl2off++;
    if (sm_res_vld) begin
      sres_t r;
      r.cyc = cyc; r.hit = sm_res_hit; r.multi = sm_res_multi; r.addr = sm_res_addr; r.ofs = sm_res_ofs;
      sm_log.push_back(r);
      if (sm_res_hit) prim_hit_cyc.push_back(cyc);
    end
    if (sm_sec_drop) n_drop++;
    if (sm_sec_vld && sm_sec_hit) begin n_sec++; sec_cyc.push_back(cyc); end
  end

  task automatic sm_write(int a, string s, int seg_hdr);
    @(negedge clk);
    sm_tw_en = 1; sm_tw_addr = 10'(a); sm_tw_valid = 1; sm_tw_value = '0; sm_tw_care = '0;
    for (int i = 0; i < s.len(); i++) begin
      sm_tw_value[8*(s.len()-1-i) +: 8] = s[i];
      sm_tw_care[8*(s.len()-1-i) +: 8] = 8'hFF;
    end
    if (seg_hdr >= 0) begin sm_tw_value[256 +: 8] = 8'(seg_hdr); sm_tw_care[256 +: 8] = 8'hFF; end
    @(negedge clk); sm_tw_en = 0;
  endtask

  task automatic sm_stream(string s);
    for (int i = 0; i < s.len(); i++) begin
      @(negedge clk);
      sm_pkt_start = (i == 0); sm_byte_vld = 1; sm_byte_in = s[i];
      sm_byte_cyc.push_back(cyc);
    end
    @(negedge clk); sm_byte_vld = 0; sm_pkt_start = 0;
    repeat (12) @(negedge clk);
  endtask

  function automatic bit found(int a, int ofs, bit multi);
    foreach (sm_log[i])
      if (sm_log[i].hit && sm_log[i].addr == a && sm_log[i].ofs == ofs && sm_log[i].multi == multi) return 1;
    return 0;
  endfunction

  task automatic sm_test(bit enc);
    sm_cfg_enc = enc; sm_cfg_hdr_bytes = 1; sm_cfg_pay_bytes = 32;
    sm_fail_row[0] = 8'd7;  sm_fail_vld[0] = enc;   // repair row 7 of segment 0 in the second run
    for (int s = 1; s < 4; s++) begin sm_fail_row[s] = 8'd200; sm_fail_vld[s] = 0; end
    rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    wait (sm_prog_done);
    sm_log.delete(); sm_byte_cyc.delete(); sec_cyc.delete(); prim_hit_cyc.delete();
    sm_write(5, "ABC", -1);
    sm_write(7, "XYZQ", -1);   // lands on the repaired row in the second run
    sm_write(9, "BC", -1);
    sm_write(11, "HDR", 8'h45);
    @(negedge clk);
    sm_sw_en = 1; sm_sw_idx = 0; sm_sw_addr = 5; sm_sw_vld = 1;
    sm_sw_rule = '{op: LOP_ANY, mask: '0, value: '0};
    @(negedge clk);
    sm_sw_idx = 1; sm_sw_addr = 9;
    @(negedge clk); sm_sw_en = 0;
    @(negedge clk); sm_hdr_load = 1; sm_hdr_in = 32'h0000_0045;
    @(negedge clk); sm_hdr_load = 0;
    sm_stream("qqqqABCqqXYZQqqHDRqq");
    check(sm_log.size() == 20, $sformatf("one primary result per byte (%0d)", sm_log.size()));
    foreach (sm_log[i]) if (i < sm_byte_cyc.size())
      check(sm_log[i].cyc == sm_byte_cyc[i] + 4,
            $sformatf("primary result four clocks after the byte (%0d)", sm_log[i].cyc - sm_byte_cyc[i]));
    check(found(5, 6, 1), "ABC found with BC as a second match");
    check(found(7, 12, 0), "XYZQ found");
    check(found(11, 17, 0), "HDR found with its header byte");
    check(sec_cyc.size() > 0 && sec_cyc[0] == prim_hit_cyc[0] + 5, "secondary result five clocks after the primary");
    foreach (sm_log[i]) if (sm_log[i].hit) begin
      n_hit++;
      if (sm_log[i].multi) n_multi++;
      if (enc) n_enc_hit++;
      if (enc && sm_log[i].addr == 7) n_repair_hit++;
    end
    // header byte mismatch: HDR must not hit
    @(negedge clk); sm_hdr_load = 1; sm_hdr_in = 32'h0000_0046;
    @(negedge clk); sm_hdr_load = 0;
    sm_log.delete();
    sm_stream("qHDRq");
    check(!found(11, 3, 0), "header byte compared");
    // back-to-back hits: the second arrives while the secondary unit is busy
    begin
      int d0;
      d0 = n_drop;
      sm_stream("ABCBC");
      check(n_drop > d0, "secondary request dropped while busy");
    end
  endtask

  // ---------------- 18 Mb TCAM ----------------
  task automatic tc_search(logic [3:0] id, logic [575:0] k, logic [575:0] kc, bit ageq,
                           output bit hit, output int addr, output int on);
    int t0;
    @(negedge clk);
    tc_srch = 1; tc_srch_id = id; tc_key = k; tc_kcare = kc; tc_age_query = ageq;
    t0 = cyc;
    @(negedge clk); tc_srch = 0;
    while (!tc_res_vld) @(negedge clk);
    check(cyc - t0 == 3, $sformatf("TCAM result after %0d clocks", cyc - t0));
    hit = tc_res_hit; addr = tc_res_addr; on = tc_banks_on;
  endtask

  task automatic tc_write(int a, logic [71:0] v, bit vac);
    @(negedge clk);
    tc_wr_en = 1; tc_wr_addr = 12'(a); tc_wr_value = v; tc_wr_care = '1; tc_wr_vacant = vac;
    @(negedge clk); tc_wr_en = 0; tc_wr_vacant = 0;
  endtask

  task automatic tc_test();
    bit hit; int addr, on;
    logic [71:0] va, vb;
    va = {8'hA5, 64'h0123_4567_89AB_CDEF};
    vb = {8'h5A, 64'hFEDC_BA98_7654_3210};
    // DX: bank 0 holds table 1, bank 1 table 2, the others table 15
    for (int b = 0; b < 16; b++) begin
      @(negedge clk);
      tc_dx_we = 1; tc_dx_bank = 4'(b); tc_dx_care = 4'hF;
      tc_dx_value = (b == 0) ? 4'd1 : (b == 1) ? 4'd2 : 4'd15;
    end
    @(negedge clk); tc_dx_we = 0;
    // aging
    tc_aging_en = 1; tc_wmode = 0;
    tc_write(20, va, 0);
    tc_write(21, vb, 0);
    tc_search(1, 576'(va), 576'({72{1'b1}}), 0, hit, addr, on);
    check(hit && addr == 20, "aging-mode lookup");
    if (on < 16) n_dx_excl++;
    tc_search(1, '0, '0, 1, hit, addr, on);
    check(hit && addr == 21, $sformatf("aging query finds the entry never hit (%0d)", addr));
    if (hit && addr == 21) n_age_query++;
    tc_search(1, 576'(vb), 576'({72{1'b1}}), 0, hit, addr, on);
    tc_search(1, '0, '0, 1, hit, addr, on);
    check(!hit, "no unused entry after both were hit");
    if (!hit) n_age_hit++;
    tc_write(20, va, 1);
    tc_search(1, 576'(va), 576'({72{1'b1}}), 0, hit, addr, on);
    check(!hit, "vacant entry does not hit");
    if (!hit) n_vacant++;
    // plain lookups and DX exclusion
    tc_aging_en = 0;
    tc_write(256 + 2, va, 0);
    tc_search(2, 576'(va), 576'({72{1'b1}}), 0, hit, addr, on);
    check(hit && addr == 258 && on == 1, $sformatf("table 2 lookup (addr %0d, %0d banks)", addr, on));
    if (on == 1) n_dx_excl++;
    tc_search(1, 576'(vb), 576'({{71{1'b1}}, 1'b0}), 0, hit, addr, on);
    check(hit && addr == 21, "table 1 lookup (bit 0 still holds the aging flags)");
    // 144-bit entry chained from rows 40 and 41
    tc_wmode = 1;
    tc_write(40, va, 0);
    tc_write(41, vb, 0);
    tc_search(1, 576'({vb, va}), 576'({144{1'b1}}), 0, hit, addr, on);
    check(hit && addr == 40, "144-bit entry");
    if (hit && addr == 40) n_wide++;
    tc_search(1, 576'({va, va}), 576'({144{1'b1}}), 0, hit, addr, on);
    check(!(hit && addr == 40), "144-bit entry needs both rows");
    tc_wmode = 0;
  endtask

  // ---------------- frame buffer ----------------
  always @(posedge clk) if (rst_n) begin
    n_zpass  += fb_ev_zpass;
    n_zfail  += fb_ev_zfail;
    n_hazard += fb_ev_hazard;
    n_miss   += fb_ev_miss;
    n_wb     += fb_ev_wb;
    n_dup    += fb_ev_dup;
  end

  task automatic fb_op(bit wr, int a, pixel_t p, output int waited, output pixel_t rd);
    int t;
    waited = 0;
    @(negedge clk);
    fb_pix_vld = 1; fb_pix_wr = wr; fb_pix_addr = 16'(a); fb_pix_in = p;
    #1;
    while (!fb_pix_rdy) begin @(negedge clk); #1; waited++; end
    @(posedge clk); #1 fb_pix_vld = 0;
    rd = '0;
    if (!wr) begin
      t = 0;
      while (!fb_hr_vld && t < 5) begin @(posedge clk); #1; t++; end
      check(fb_hr_vld, "host read answered");
      rd = fb_hr_pix;
      n_hr++;
    end
  endtask

  task automatic fb_test();
    pixel_t cv, p, r;
    int w, d0;
    fb_mode = ALU_BOTH; fb_blend_en = 0; fb_pass_in = 0;
    cv = '0; cv.z = '1; cv.g = 8'h20;
    @(negedge clk); fb_erase_pix = cv; fb_erase_start = 1;
    @(negedge clk); fb_erase_start = 0;
    d0 = cyc;
    while (fb_erase_busy) @(negedge clk);
    check(n_dup == 63, $sformatf("clear copied %0d rows by DUP", n_dup));
    check(cyc - d0 < 4 * 20 + 64 + 8, "clear time");
    fb_op(0, 12345, p, w, r);
    check(r == cv, "cleared pixel");
    p = '0; p.z = 100; p.a = 8'h80; p.r = 8'hF0;
    fb_op(1, 300, p, w, r);
    p.z = 200; p.r = 8'h0F;
    fb_op(1, 300, p, w, r);
    check(w == 7, $sformatf("same-address pixel held %0d clocks", w));
    fb_op(0, 300, p, w, r);
    check(r.z == 100 && r.r == 8'hF0, "Z-fail keeps the nearer pixel");
    fb_blend_en = 1;
    p.z = 50; p.a = 8'h80; p.r = 8'h00; p.g = 8'h00; p.b = 8'h00;
    fb_op(1, 300, p, w, r);
    fb_op(0, 300, p, w, r);
    // (255-128)*0xF0 + 128*0 = 30480 -> /255 = 119.5 -> 120
    check(r.z == 50 && r.r == 8'd120, $sformatf("alpha blend r=%0d", r.r));
    if (r.r == 8'd120) n_blend++;
    // same cache line index, other tag: miss with write-back of the dirty line
    fb_op(0, 300 + 32 * 8, p, w, r);
    check(r == cv, "pixel after miss");
    fb_op(0, 300, p, w, r);
    check(r.z == 50 && r.r == 8'd120, "written-back pixel reloaded");
    fb_blend_en = 0;
  endtask

  // ---------------- filter ----------------
  task automatic flt_test();
    int sum;
    @(negedge clk);
    for (int n = 0; n < 16; n++) begin
      flt_smp[n] = $urandom;
      for (int c = 0; c < 4; c++) flt_wgt[c][n] = 8'd16;
    end
    flt_in_vld = 1;
    @(negedge clk); flt_in_vld = 0;
    check(flt_out_vld, "filter result one clock later");
    for (int c = 0; c < 4; c++) begin
      sum = 0;
      for (int n = 0; n < 16; n++) sum += flt_smp[n][c*8 +: 8];
      check(flt_out_pix[c*8 +: 8] == 8'((16 * sum + 128) >> 8), "box filter mean");
    end
    if (flt_out_vld) n_flt++;
  endtask

  initial begin
    cyc = 0;
    sm_cfg_enc = 0; sm_cfg_hdr_bytes = 0; sm_cfg_pay_bytes = 32;
    sm_fail_row = '{default: '0}; sm_fail_vld = '{default: 0};
    sm_tw_en = 0; sm_tw_addr = 0; sm_tw_value = 0; sm_tw_care = 0; sm_tw_valid = 0;
    sm_tr_en = 0; sm_tr_addr = 0;
    sm_sw_en = 0; sm_sw_idx = 0; sm_sw_rule = '{op: LOP_ANY, mask: '0, value: '0}; sm_sw_addr = 0; sm_sw_vld = 0;
    sm_hdr_load = 0; sm_hdr_in = 0; sm_pkt_start = 0; sm_byte_vld = 0; sm_byte_in = 0;
    tc_aging_en = 0; tc_wmode = 0; tc_dx_we = 0; tc_dx_bank = 0; tc_dx_value = 0; tc_dx_care = 0;
    tc_wr_en = 0; tc_wr_vacant = 0; tc_wr_addr = 0; tc_wr_value = 0; tc_wr_care = 0;
    tc_srch = 0; tc_age_query = 0; tc_srch_id = 0; tc_key = 0; tc_kcare = 0;
    fb_mode = ALU_BOTH; fb_blend_en = 0; fb_pix_vld = 0; fb_pix_wr = 0; fb_pix_addr = 0;
    fb_pix_in = '0; fb_erase_pix = '0; fb_pass_in = 0; fb_erase_start = 0;
    flt_in_vld = 0; flt_smp = '{default: '0}; flt_wgt = '{default: '{default: '0}};

    sm_test(0);
    sm_test(1);
    tc_test();
    fb_test();
    flt_test();

    $display("sm: hit %0d multi %0d sec %0d drop %0d sl2off %0d enc %0d repair %0d",
             n_hit, n_multi, n_sec, n_drop, n_sl2off, n_enc_hit, n_repair_hit);
    $display("tc: dx_excl %0d wide %0d age_hit %0d age_query %0d vacant %0d",
             n_dx_excl, n_wide, n_age_hit, n_age_query, n_vacant);
    $display("fb: zpass %0d zfail %0d blend %0d hazard %0d miss %0d wb %0d dup %0d hostrd %0d flt %0d",
             n_zpass, n_zfail, n_blend, n_hazard, n_miss, n_wb, n_dup, n_hr, n_flt);
    check(n_hit > 0, "mechanism: primary hit");
    check(n_multi > 0, "mechanism: multiple hit");
    check(n_sec > 0, "mechanism: secondary hit");
    check(n_drop > 0, "mechanism: secondary drop");
    check(n_sl2off > 0, "mechanism: stage-2 search lines off");
    check(n_enc_hit > 0, "mechanism: encoded search lines");
    check(n_repair_hit > 0, "mechanism: repaired row");
    check(n_dx_excl > 0, "mechanism: DX bank exclusion");
    check(n_wide > 0, "mechanism: chained entry");
    check(n_age_hit > 0, "mechanism: aging hit flag");
    check(n_age_query > 0, "mechanism: aging query");
    check(n_vacant > 0, "mechanism: vacant erase");
    check(n_zpass > 0, "mechanism: Z-pass");
    check(n_zfail > 0, "mechanism: Z-fail");
    check(n_blend > 0, "mechanism: alpha blend");
    check(n_hazard > 0, "mechanism: same-address hold");
    check(n_miss > 0, "mechanism: cache miss");
    check(n_wb > 0, "mechanism: write-back");
    check(n_dup > 0, "mechanism: DUP");
    check(n_hr > 0, "mechanism: host read");
    check(n_flt > 0, "mechanism: filter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
