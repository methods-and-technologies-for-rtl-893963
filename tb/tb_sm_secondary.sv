// Self-checking test of sm_secondary: 16 entries of random header rules and
// primary addresses; primary hits are offered every clock, so the unit must
// accept one every four clocks and flag the three in between as dropped.
// Each accepted request must give its result exactly five clocks later: the
// lowest entry whose rule passes on the header and whose address equals the
// hit address, with the hit's offset.
module tb_sm_secondary;
  import sm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n;
  always #5 clk = ~clk;

  logic cfg_we, cfg_vld, req, sec_drop, sec_vld, sec_hit;
  logic [3:0] cfg_idx, sec_idx;
  lop_rule_t cfg_rule;
  logic [11:0] cfg_addr, req_addr;
  logic [31:0] hdr;
  logic [15:0] req_ofs, sec_ofs;

  sm_secondary dut (.clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_idx(cfg_idx),
    .cfg_rule(cfg_rule), .cfg_addr(cfg_addr), .cfg_vld(cfg_vld), .hdr(hdr), .req(req),
    .req_addr(req_addr), .req_ofs(req_ofs), .sec_drop(sec_drop), .sec_vld(sec_vld),
    .sec_hit(sec_hit), .sec_idx(sec_idx), .sec_ofs(sec_ofs));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  lop_rule_t rr [16];
  logic [11:0] ra [16];
  bit rvl [16];

  function automatic bit rule_ok(lop_rule_t r, logic [31:0] h);
    longint unsigned a = longint'(h & r.mask), b = longint'(r.value);
    case (r.op)
      LOP_EQ: return a == b;  LOP_NE: return a != b;
      LOP_GT: return a > b;   LOP_GE: return a >= b;
      LOP_LT: return a < b;   LOP_LE: return a <= b;
      default: return 1;
    endcase
  endfunction

  typedef struct { int due; bit hit; int idx; int ofs; } exp_t;
  exp_t expq[$];
  int cyc = 0, accepted = 0, dropped = 0, hits = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && sec_vld) begin
      exp_t e;
      if (expq.size() == 0) check(0, "unexpected result");
      else begin
        e = expq.pop_front();
        check(cyc == e.due, $sformatf("result at %0d due %0d", cyc, e.due));
        check(sec_hit == e.hit, "secondary hit");
        if (e.hit) begin check(int'(sec_idx) == e.idx, "secondary index"); hits++; end
        check(int'(sec_ofs) == e.ofs, "offset");
      end
    end
  end

  initial begin
    int phase;
    cfg_we = 0; req = 0; hdr = 0; req_addr = 0; req_ofs = 0; cfg_idx = 0; cfg_addr = 0; cfg_vld = 0;
    cfg_rule = '{op: LOP_ANY, mask: '0, value: '0};
    rst_n = 0; repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      hdr = $urandom;
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        cfg_we = 1; cfg_idx = 4'(i);
        cfg_rule.op = lop_op_e'($urandom % 7);
        cfg_rule.mask = 32'h0000FFFF;
        cfg_rule.value = (hdr & 32'h0000FFFF) + 32'($urandom % 3) - 32'd1;
        cfg_addr = 12'($urandom % 6); cfg_vld = ($urandom % 5) != 0;
        rr[i] = cfg_rule; ra[i] = cfg_addr; rvl[i] = cfg_vld;
      end
      @(negedge clk); cfg_we = 0;
      repeat (5) @(negedge clk);
      phase = 0;
      for (int n = 0; n < 40; n++) begin
        @(negedge clk);
        req = 1; req_addr = 12'($urandom % 6); req_ofs = 16'($urandom);
        #1;
        check(sec_drop == (phase != 0), $sformatf("drop pattern phase %0d", phase));
        if (phase == 0) begin
          exp_t e; e.due = cyc + 5; e.hit = 0; e.idx = 0; e.ofs = int'(req_ofs);
          for (int i = 15; i >= 0; i--)
            if (rvl[i] && ra[i] == req_addr && rule_ok(rr[i], hdr)) begin e.hit = 1; e.idx = i; end
          expq.push_back(e); accepted++;
        end else dropped++;
        phase = (phase + 1) % 4;
      end
      @(negedge clk); req = 0;
      repeat (8) @(negedge clk);
    end
    check(expq.size() == 0, "all results seen");
    check(hits > 0 && dropped > 0, "hits and drops occurred");
    $display("accepted %0d dropped %0d hits %0d", accepted, dropped, hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
