// Primary lookup TCAM of the signature-matching co-processor.
//
// ENTRIES logical entries of 2*PAIRS ternary digits, stored as four cells per
// digit pair (encoding chosen by tcam_store_enc, search lines by
// tcam_sl_gen; an entry matches when no asserted search line meets a cell
// holding 1).
//
// Improved hierarchical pipelined search, two stages:
//  stage 1 (cycle t)   the low S1_PAIRS pairs of every valid row are compared;
//                      the result is latched as ML_previous.
//  stage 2 (cycle t+1) only if some ML_previous is high are the stage-2
//                      search lines driven; then only rows whose ML_previous
//                      is high are evaluated (conditional charging).  Stage-2
//                      match lines are never reset: rows not evaluated keep
//                      their old level.
//  final   (cycle t+2) match = ML_previous AND ML_next, so a stale high
//                      ML_next cannot create a false hit.  The physical
//                      match lines pass the redundancy MUX (red_hw_shift) and
//                      the priority encoder; the result is registered.
// Result: res_vld three clocks after srch_en, one search per clock.
// sl2_active and ml2_dis_cnt report, for the stage-2 evaluation of the
// search now leaving stage 2, whether its search lines were driven and how
// many stage-2 match lines discharged (a high-to-low change); with 100%
// matching searches ml2_dis_cnt stays 0 because no overall ML reset exists.
//
// Repair: physical rows = ENTRIES/SEG_ROWS*(SEG_ROWS+SPARES).  Writes and
// reads go through red_sw_remap, searches through red_hw_shift.  Each row has
// a valid bit cleared by reset; an invalid row never matches.  A read returns
// the stored cells one clock after rd_en.  The split point S1_PAIRS, the
// valid bit, the read port and the tag that travels with a search are
// choices of this design.
// Default ENTRIES is 1024 (the document's table has 4096): the row loops at
// 4096 entries exceed the elaboration tools' loop limit.
module sm_tcam #(
  parameter int ENTRIES      = 1024,
  parameter int PAIRS    = 144,
  parameter int S1_PAIRS = 72,
  parameter int SEG_ROWS = 256,
  parameter int SPARES   = 2,
  parameter int TAG_W    = 16,
  parameter int SEGS     = ENTRIES / SEG_ROWS,
  parameter int PHYS     = SEGS * (SEG_ROWS + SPARES),
  parameter int AW       = $clog2(ENTRIES),
  parameter int LW       = $clog2(SEG_ROWS),
  parameter int CW       = $clog2(PHYS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // fuse PROM contents
  input  logic [LW-1:0]      fail_row [SEGS],  // failed row per segment
  input  logic               fail_vld [SEGS],  // segment repaired
  output logic               prog_done,        // redundancy MUX programmed
  // write / read port (logical addresses)
  input  logic               wr_en,            // write an entry
  input  logic [AW-1:0]      wr_addr,          // entry address
  input  logic [4*PAIRS-1:0] wr_cells,         // encoded cells
  input  logic               wr_valid,         // 1 store, 0 invalidate
  input  logic               rd_en,            // read an entry
  input  logic [AW-1:0]      rd_addr,          // entry address
  output logic [4*PAIRS-1:0] rd_cells,         // cells, 1 clock after rd_en
  output logic               rd_valid,         // valid bit of that entry
  // search port
  input  logic               srch_en,          // start a search
  input  logic [4*PAIRS-1:0] sl,               // search lines
  input  logic [TAG_W-1:0]   tag_in,           // carried with the search
  output logic               res_vld,          // result valid (t+3)
  output logic               res_hit,          // some entry matched
  output logic               res_multi,        // several entries matched
  output logic [AW-1:0]      res_addr,         // highest-priority entry
  output logic [TAG_W-1:0]   res_tag,          // tag of that search
  output logic               sl2_active,       // stage-2 SLs were driven
  output logic [CW-1:0]      ml2_dis_cnt       // stage-2 ML discharges
);
  localparam int S1B = 4 * S1_PAIRS;           // stage-1 cells per row
  localparam int S2B = 4 * (PAIRS - S1_PAIRS); // stage-2 cells per row
  localparam int PW  = $clog2(PHYS);

  logic [4*PAIRS-1:0] cells [PHYS];
  logic [PHYS-1:0]    valid;

  // ---------------- write / read with software repair ----------------
  logic [PW-1:0] wr_paddr, rd_paddr;
  red_sw_remap #(.ENTRIES(ENTRIES), .SEG_ROWS(SEG_ROWS), .SPARES(SPARES)) u_wmap (
    .laddr(wr_addr), .fail_row(fail_row), .fail_vld(fail_vld), .paddr(wr_paddr));
  red_sw_remap #(.ENTRIES(ENTRIES), .SEG_ROWS(SEG_ROWS), .SPARES(SPARES)) u_rmap (
    .laddr(rd_addr), .fail_row(fail_row), .fail_vld(fail_vld), .paddr(rd_paddr));

  always_ff @(posedge clk) begin
    if (wr_en) cells[wr_paddr] <= wr_cells;
    if (rd_en) rd_cells <= cells[rd_paddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= '0;
      rd_valid <= 1'b0;
    end else begin
      if (wr_en) valid[wr_paddr] <= wr_valid;
      if (rd_en) rd_valid <= valid[rd_paddr];
    end
  end

  // ---------------- stage 1 ----------------
  logic [PHYS-1:0]  ml1;
  always_comb begin
    for (int r = 0; r < PHYS; r++)
      ml1[r] = valid[r] && ((sl[S1B-1:0] & cells[r][S1B-1:0]) == '0);
  end

  logic [PHYS-1:0]  ml_prev;        // ML_previous, latched stage-1 result
  logic [PHYS-1:0]  ml_prev_d;      // ML_previous aligned with ML_next
  logic [PHYS-1:0]  ml_next;        // ML_next, stage-2 match lines
  logic [S2B-1:0]   sl2_q;
  logic             s1_vld, s2_vld;
  logic [TAG_W-1:0] tag1, tag2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_vld <= 1'b0;
      s2_vld <= 1'b0;
      ml_prev <= '0;
      ml_prev_d <= '0;
    end else begin
      s1_vld <= srch_en;
      s2_vld <= s1_vld;
      if (srch_en) ml_prev <= ml1;
      ml_prev_d <= s1_vld ? ml_prev : '0;
    end
  end

  always_ff @(posedge clk) begin
    sl2_q <= sl[4*PAIRS-1:S1B];
    tag1  <= tag_in;
    tag2  <= tag1;
  end

  // ---------------- stage 2: conditional charging, no ML reset ----------
  logic sl2_on;
  assign sl2_on = s1_vld && (ml_prev != '0);

  logic [PHYS-1:0] ml_next_d;
  always_comb begin
    ml_next_d = ml_next;
    if (sl2_on)
      for (int r = 0; r < PHYS; r++)
        if (ml_prev[r])
          ml_next_d[r] = ((sl2_q & cells[r][4*PAIRS-1:S1B]) == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ml_next     <= '0;
      sl2_active  <= 1'b0;
      ml2_dis_cnt <= '0;
    end else begin
      ml_next    <= ml_next_d;
      sl2_active <= sl2_on;
      ml2_dis_cnt <= CW'($countones(ml_next & ~ml_next_d));
    end
  end

  // ---------------- final match, repair MUX, priority ----------------
  logic [PHYS-1:0]    fm;
  logic [ENTRIES-1:0] lml;
  logic               pe_hit, pe_multi;
  logic [AW-1:0]      pe_idx;

  assign fm = ml_prev_d & ml_next;

  red_hw_shift #(.ENTRIES(ENTRIES), .SEG_ROWS(SEG_ROWS), .SPARES(SPARES)) u_hw (
    .clk(clk), .rst_n(rst_n), .fail_row(fail_row), .fail_vld(fail_vld),
    .prog_done(prog_done), .phys_ml(fm), .log_ml(lml));

  prio_enc #(.N(ENTRIES)) u_pe (.req(lml), .hit(pe_hit), .multi(pe_multi), .idx(pe_idx));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_vld   <= 1'b0;
      res_hit   <= 1'b0;
      res_multi <= 1'b0;
      res_addr  <= '0;
      res_tag   <= '0;
    end else begin
      res_vld   <= s2_vld;
      res_hit   <= s2_vld && pe_hit;
      res_multi <= s2_vld && pe_multi;
      res_addr  <= pe_idx;
      res_tag   <= tag2;
    end
  end
endmodule
