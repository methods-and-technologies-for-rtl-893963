// End-to-end test of the signature-matching co-processor at reduced size
// (256 primary entries in 4 repair segments).  Signatures of 3..12
// characters, some with case-insensitive letters (bit 5 don't care) and some
// also requiring a header byte, are written right-aligned in the payload
// window; random packets with planted signatures are streamed one byte per
// clock.  Every primary result is compared with a reference search over the
// same window (lowest matching entry, offset), and must arrive four clocks
// after its byte.  Secondary entries pair header rules with primary
// entries; the test models the one-in-four acceptance and checks each
// secondary result.  Both search-line encodings and random fuse settings are
// used.
module tb_sigmatch_top;
  import sm_pkg::*;
  localparam int ENTRIES = 256, SEG = 64, SEGS = ENTRIES / SEG;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic cfg_enc; logic [2:0] cfg_hdr_bytes; logic [5:0] cfg_pay_bytes;
  logic [5:0] fail_row [SEGS]; logic fail_vld [SEGS]; logic prog_done;
  logic tw_en, tw_valid, tr_en, tr_valid; logic [7:0] tw_addr, tr_addr;
  logic [287:0] tw_value, tw_care; logic [575:0] tr_cells;
  logic sw_en, sw_vld; logic [3:0] sw_idx; lop_rule_t sw_rule; logic [7:0] sw_addr;
  logic hdr_load, pkt_start, byte_vld; logic [31:0] hdr_in; logic [7:0] byte_in;
  logic res_vld, res_hit, res_multi; logic [7:0] res_addr; logic [15:0] res_ofs;
  logic sec_drop, sec_vld, sec_hit; logic [3:0] sec_idx; logic [15:0] sec_ofs;
  logic sl2_active; logic [8:0] ml2_dis_cnt;

  sigmatch_top #(.ENTRIES(ENTRIES), .SEG_ROWS(SEG)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #50000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference tables
  logic [287:0] rv [ENTRIES], rc [ENTRIES]; bit rvl [ENTRIES];
  lop_rule_t srule [16]; logic [7:0] saddr [16]; bit svl [16];
  byte sigs [ENTRIES][$];

  typedef struct { int due; bit hit; int addr; int ofs; } pexp_t;
  typedef struct { int due; bit hit; int idx; int ofs; } sexp_t;
  pexp_t pq[$]; sexp_t sq[$];
  int cyc = 0, last_acc = -100;
  int n_hit = 0, n_multi = 0, n_sec = 0, n_drop = 0, n_sl2off = 0;
  logic [31:0] cur_hdr;

  function automatic bit rule_ok(lop_rule_t r, logic [31:0] h);
    longint unsigned a = longint'(h & r.mask), b = longint'(r.value);
    case (r.op)
      LOP_EQ: return a == b;  LOP_NE: return a != b;
      LOP_GT: return a > b;   LOP_GE: return a >= b;
      LOP_LT: return a < b;   LOP_LE: return a <= b;
      default: return 1;
    endcase
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && !sl2_active) n_sl2off++;
    if (rst_n && res_vld) begin
      pexp_t e;
      if (pq.size() == 0) check(0, "unexpected primary result");
      else begin
        e = pq.pop_front();
        check(cyc == e.due, $sformatf("primary latency: at %0d due %0d", cyc, e.due));
        check(res_hit == e.hit, $sformatf("primary hit ofs %0d exp %0d got %0d", e.ofs, e.hit, res_hit));
        check(int'(res_ofs) == e.ofs, "primary offset");
        if (e.hit && res_hit) begin
          check(int'(res_addr) == e.addr, $sformatf("primary addr %0d expected %0d", res_addr, e.addr));
          n_hit++;
          if (res_multi) n_multi++;
          // secondary acceptance model: one request per 4 clocks
          if (cyc - last_acc >= 4) begin
            sexp_t s; last_acc = cyc;
            s.due = cyc + 5; s.hit = 0; s.idx = 0; s.ofs = e.ofs;
            for (int i = 15; i >= 0; i--)
              if (svl[i] && saddr[i] == res_addr && rule_ok(srule[i], cur_hdr)) begin s.hit = 1; s.idx = i; end
            sq.push_back(s);
          end else n_drop++;
        end
      end
    end
    if (rst_n && sec_vld) begin
      sexp_t s;
      if (sq.size() == 0) check(0, "unexpected secondary result");
      else begin
        s = sq.pop_front();
        check(cyc == s.due, "secondary latency");
        check(sec_hit == s.hit, "secondary hit");
        if (s.hit) begin check(int'(sec_idx) == s.idx, "secondary index"); n_sec++; end
        check(int'(sec_ofs) == s.ofs, "secondary offset");
      end
    end
  end

  function automatic pexp_t ref_search(logic [287:0] key, int ofs);
    pexp_t e; logic [287:0] bm;
    bm = '0;
    for (int b = 0; b < 32; b++) if (b < int'(cfg_pay_bytes)) bm[8*b +: 8] = 8'hFF;
    for (int b = 0; b < 4; b++) if (b < int'(cfg_hdr_bytes)) bm[256 + 8*b +: 8] = 8'hFF;
    e.hit = 0; e.addr = 0; e.ofs = ofs; e.due = 0;
    for (int a = ENTRIES - 1; a >= 0; a--)
      if (rvl[a] && ((((key ^ rv[a]) & rc[a]) & bm) == '0)) begin e.hit = 1; e.addr = a; end
    return e;
  endfunction

  initial begin
    byte hist[$];
    cfg_enc = 0; cfg_hdr_bytes = 2; cfg_pay_bytes = 32;
    tw_en = 0; tw_valid = 0; tw_addr = 0; tw_value = 0; tw_care = 0; tr_en = 0; tr_addr = 0;
    sw_en = 0; sw_vld = 0; sw_idx = 0; sw_addr = 0; sw_rule = '{op: LOP_ANY, mask: '0, value: '0};
    hdr_load = 0; pkt_start = 0; byte_vld = 0; hdr_in = 0; byte_in = 0;
    for (int cfg = 0; cfg < 2; cfg++) begin
      cfg_enc = cfg[0];
      for (int s = 0; s < SEGS; s++) begin fail_row[s] = 6'($urandom); fail_vld[s] = 1'($urandom); end
      rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
      wait (prog_done);
      // primary table: 200 signatures
      for (int a = 0; a < ENTRIES; a++) begin
        int len;
        len = 3 + $urandom % 10;
        rv[a] = '0; rc[a] = '0; sigs[a].delete();
        for (int i = 0; i < len; i++) begin
          byte c;
          c = byte'(8'h41 + $urandom % 6);          // letters A..F: collisions are common
          sigs[a].push_back(c);
          rv[a][8*(len-1-i) +: 8] = c;
          rc[a][8*(len-1-i) +: 8] = (a % 3 == 0) ? 8'hDF : 8'hFF;  // every third: any case
        end
        if (a % 7 == 0) begin rc[a][256 +: 8] = 8'hFF; rv[a][256 +: 8] = 8'h50; end
        rvl[a] = (a < 200);
        @(negedge clk);
        tw_en = 1; tw_addr = 8'(a); tw_value = rv[a]; tw_care = rc[a]; tw_valid = rvl[a];
      end
      @(negedge clk); tw_en = 0;
      // secondary table
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        sw_en = 1; sw_idx = 4'(i);
        sw_rule.op = (i % 2) ? LOP_LT : LOP_GE; sw_rule.mask = 32'hFFFF0000;
        sw_rule.value = 32'd80 << 16;
        sw_addr = 8'($urandom % 200); sw_vld = 1;
        srule[i] = sw_rule; saddr[i] = sw_addr; svl[i] = 1;
      end
      @(negedge clk); sw_en = 0;
      // packets
      for (int p = 0; p < 12; p++) begin
        int len;
        len = 40 + $urandom % 60;
        cfg_hdr_bytes = 3'($urandom % 3);
        cfg_pay_bytes = (p % 3 == 0) ? 6'd16 : 6'd32;
        cur_hdr = {16'($urandom % 160), 8'($urandom), (p % 2) ? 8'h50 : 8'h51};
        hist.delete();
        @(negedge clk); hdr_load = 1; hdr_in = cur_hdr;
        @(negedge clk); hdr_load = 0;
        for (int i = 0; i < len; i++) begin
          byte b; logic [287:0] key; pexp_t e;
          if (i % 15 == 5) begin
            int s;
            s = $urandom % 200;
            foreach (sigs[s][j]) hist.push_front(sigs[s][j]);
            i += sigs[s].size() - 1;
            for (int j = sigs[s].size() - 1; j >= 0; j--) begin
              b = hist[j];
              @(negedge clk);
              pkt_start = (hist.size() - j == 1); byte_vld = 1; byte_in = b;
              key = {cur_hdr, 256'(0)};
              for (int k = 0; k < 32; k++) if (k + j < hist.size()) key[8*k +: 8] = hist[k + j];
              e = ref_search(key, hist.size() - 1 - j); e.due = cyc + 4;
              pq.push_back(e);
            end
          end else begin
            b = byte'(8'h41 + $urandom % 8);
            hist.push_front(b);
            @(negedge clk);
            pkt_start = (i == 0); byte_vld = 1; byte_in = b;
            key = {cur_hdr, 256'(0)};
            for (int k = 0; k < 32 && k < hist.size(); k++) key[8*k +: 8] = hist[k];
            e = ref_search(key, hist.size() - 1); e.due = cyc + 4;
            pq.push_back(e);
          end
        end
        @(negedge clk); byte_vld = 0; pkt_start = 0;
        repeat (10) @(negedge clk);
      end
    end
    repeat (10) @(negedge clk);
    check(pq.size() == 0 && sq.size() == 0, "all results seen");
    check(n_hit > 20 && n_multi > 0 && n_sec > 0 && n_drop > 0 && n_sl2off > 0, "mechanisms exercised");
    $display("hits %0d multi %0d sec_hits %0d drops %0d sl2_off %0d", n_hit, n_multi, n_sec, n_drop, n_sl2off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
