// Self-checking test of the frame-buffer memory (fb_top) at a reduced size
// (4 banks x 8 rows x 4 blocks, 4 cache lines).
// Three instances get the same pixel stream: one in ALU_BOTH mode, and a
// Z chip feeding pass_out into a colour chip.  A reference model applies
// each accepted operation in order: depth test (Z-pass when the new Z is
// smaller), alpha blend or replace.  Checked: the clear sequence (every
// pixel becomes the erase value, one DUP row per clock, total clocks),
// host reads two clocks after acceptance, a same-address pixel held until
// the earlier write is seven clocks old, cache misses with write-back of
// dirty lines, the final contents of all three chips, and that the pair
// stays in lock step.  Every mechanism must have occurred.
module tb_fb_top;
  import fb_pkg::*;
  localparam int BANKS = 4, ROWS = 8, PB = 4, LINES = 4;
  localparam int AW = 2 + 3 + 2 + 3;
  localparam int NPIX = 1 << AW;
  int checks, failures;

  logic clk = 0, rst_n = 0;
  logic blend_en = 0, pix_vld = 0, pix_wr = 0, erase_start = 0;
  logic [AW-1:0] pix_addr = '0;
  pixel_t pix_in, erase_pix;
  logic rdy [3], hrv [3], ebusy [3], evzp [3], evzf [3], evhz [3], evms [3], evwb [3], evdp [3];
  pixel_t hrp [3];
  logic pass_z, pass_b, pass_c;
  alu_mode_e modes [3];
  assign modes[0] = ALU_BOTH;
  assign modes[1] = ALU_ZCHIP;
  assign modes[2] = ALU_COLOR;

  for (genvar k = 0; k < 3; k++) begin : g_chip
    logic po;
    fb_top #(.BANKS(BANKS), .ROWS(ROWS), .PAGE_BLKS(PB), .LINES(LINES)) u (
      .clk, .rst_n, .mode(modes[k]), .blend_en, .pix_vld, .pix_wr, .pix_addr, .pix_in,
      .pix_rdy(rdy[k]), .pass_in((k == 2) ? pass_z : 1'b0), .pass_out(po),
      .hr_vld(hrv[k]), .hr_pix(hrp[k]), .erase_start, .erase_pix, .erase_busy(ebusy[k]),
      .ev_zpass(evzp[k]), .ev_zfail(evzf[k]), .ev_hazard(evhz[k]), .ev_miss(evms[k]),
      .ev_wb(evwb[k]), .ev_dup(evdp[k]));
  end
  assign pass_b = g_chip[0].po;
  assign pass_z = g_chip[1].po;
  assign pass_c = g_chip[2].po;

  always #5 clk = ~clk;

  pixel_t ref_m [NPIX];
  pixel_t exp_q [$];
  int n_zpass, n_zfail, n_hazard, n_miss, n_wb, n_dup, n_hr, n_blend;
  longint cyc;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [7:0] bl(logic [7:0] s, logic [7:0] d, logic [7:0] a);
    int num;
    num = (255 - a) * s + a * d;
    return 8'((2 * num + 255) / 510);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      n_zpass  += evzp[0];
      n_zfail  += evzf[0];
      n_hazard += evhz[0];
      n_miss   += evms[0];
      n_wb     += evwb[0];
      n_dup    += evdp[0];
      check(rdy[0] == rdy[1] && rdy[1] == rdy[2], "chips in lock step");
      check(pass_b == pass_z, "Z chip and single chip agree on Z");
      if (hrv[0]) begin
        pixel_t e;
        n_hr++;
        check(hrv[1] && hrv[2], "host read on all chips");
        if (exp_q.size() == 0) check(0, "unexpected host read data");
        else begin
          e = exp_q.pop_front();
          check(hrp[0] == e, $sformatf("host read %h exp %h", hrp[0], e));
          check(hrp[1].z == e.z, "Z chip depth");
          check(hrp[2][31:0] == e[31:0], "colour chip colour");
        end
      end
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // offer one operation until accepted; returns the wait in clocks
  task automatic op(bit wr, logic [AW-1:0] a, pixel_t p, output int waited);
    waited = 0;
    @(negedge clk);
    pix_vld = 1; pix_wr = wr; pix_addr = a; pix_in = p;
    #1;
    while (!rdy[0]) begin
      @(negedge clk); #1; waited++;
    end
    if (wr) begin
      pixel_t s;
      s = ref_m[a];
      if (p.z < s.z) begin
        s.z = p.z;
        if (blend_en) begin
          s.a = bl(s.a, p.a, p.a); s.r = bl(s.r, p.r, p.a);
          s.g = bl(s.g, p.g, p.a); s.b = bl(s.b, p.b, p.a);
          n_blend++;
        end else begin
          {s.a, s.r, s.g, s.b} = {p.a, p.r, p.g, p.b};
        end
        ref_m[a] = s;
      end
    end else begin
      exp_q.push_back(ref_m[a]);
    end
    @(posedge clk);
    #1 pix_vld = 0;
  endtask

  task automatic clear(pixel_t v);
    longint t0;
    int dups0;
    @(negedge clk);
    erase_pix = v; erase_start = 1;
    t0 = cyc;
    dups0 = n_dup;
    @(negedge clk);
    erase_start = 0;
    while (ebusy[0]) @(negedge clk);
    check(n_dup - dups0 == ROWS - 1, $sformatf("DUP rows %0d", n_dup - dups0));
    check(cyc - t0 <= BANKS * PB + ROWS + 6, $sformatf("clear took %0d clocks", cyc - t0));
    for (int i = 0; i < NPIX; i++) ref_m[i] = v;
  endtask

  task automatic read_all();
    int w;
    pixel_t dummy;
    dummy = '0;
    for (int i = 0; i < NPIX; i++) op(0, AW'(i), dummy, w);
    repeat (4) @(negedge clk);
    check(exp_q.size() == 0, "all host reads answered");
  endtask

  initial begin
    int w;
    pixel_t p, cv;
    logic [AW-1:0] a;
    cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cv = '0;
    cv.z = '1;
    cv.b = 8'h40;
    clear(cv);
    read_all();

    // host read latency: data two clocks after acceptance
    begin
      pixel_t dummy;
      int seen;
      dummy = '0;
      op(0, AW'(5), dummy, w);
      seen = -1;
      for (int k = 0; k < 4; k++) begin
        if (hrv[0] && seen < 0) seen = k;
        @(negedge clk);
      end
      check(seen == 2, $sformatf("host read data in stage %0d", seen));
    end

    // same address back to back: held until the first write has left stage 7
    begin
      p = '0; p.z = 32'h100; p.r = 8'h11;
      op(1, AW'(9), p, w);
      p.z = 32'h80;
      op(1, AW'(9), p, w);
      check(w == 7, $sformatf("same-address pixel waited %0d clocks", w));
    end

    for (int phase = 0; phase < 4; phase++) begin
      blend_en = phase[0];
      for (int i = 0; i < 600; i++) begin
        a = (phase < 2) ? AW'($urandom % 48) : AW'($urandom);
        p.z = $urandom % 1000;
        p.a = $urandom; p.r = $urandom; p.g = $urandom; p.b = $urandom;
        op(($urandom % 8) != 0, a, p, w);
      end
      read_all();
    end
    clear(cv);
    read_all();

    $display("zpass %0d zfail %0d blend %0d hazard %0d miss %0d wb %0d dup %0d hostrd %0d",
             n_zpass, n_zfail, n_blend, n_hazard, n_miss, n_wb, n_dup, n_hr);
    check(n_zpass > 0, "Z-pass happened");
    check(n_zfail > 0, "Z-fail happened");
    check(n_blend > 0, "blend happened");
    check(n_hazard > 0, "hazard hold happened");
    check(n_miss > 0, "cache miss happened");
    check(n_wb > 0, "write-back happened");
    check(n_dup > 0, "DUP happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
