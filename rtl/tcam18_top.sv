// 18 Mb full ternary CAM with flexible partitioning and aging.
//
// 16 banks x ROWS rows x 72 bits (document: 16K rows) (256K x 72b; by chaining rows also
// 128K x 144b, 64K x 288b or 32K x 576b, chosen by wmode).  A search is a
// two-stage hierarchical operation:
//   stage 1 (cycle t)   the 4-bit table ID on the DX pins is compared with the
//                       one DX entry of every bank (tc18_dx);
//   stage 2 (cycle t+1) only banks whose DX matched are searched (tc18_bank),
//                       so table sizes are free multiples of a bank and
//                       unrelated banks neither burn power nor give stray
//                       hits;
//   result  (cycle t+3) the lowest matching address over all searched banks
//                       (bank-major priority), registered.
// banks_on reports how many banks were searched for the result now shown.
// Address = bank*ROWS + row (the first row of a chained entry).  Aging and
// the vacant/occupied indicator live in bit <0> of each row, see tc18_bank.
// One search may be started every clock; writes are taken in the clock they
// are presented and are seen by searches started after it.
// Default ROWS is 256 per bank (the document's banks have 16K rows): larger
// banks exceed the elaboration tools' loop limit.
module tcam18_top #(
  parameter int BANKS = 16,
  parameter int ROWS  = 256,
  parameter int W     = 72,
  parameter int DXW   = 4,
  parameter int RW    = $clog2(ROWS),
  parameter int BKW   = $clog2(BANKS),
  parameter int AW    = RW + BKW
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           aging_en,    // bit<0> used for vacant/aging
  input  logic [1:0]     wmode,       // 72/144/288/576-bit entries
  // DX programming
  input  logic           dx_we,       // write a bank's DX entry
  input  logic [BKW-1:0] dx_bank,     // bank index
  input  logic [DXW-1:0] dx_value,    // DX digits
  input  logic [DXW-1:0] dx_care,     // 1 = digit compared
  // row write
  input  logic           wr_en,       // write a row
  input  logic [AW-1:0]  wr_addr,     // {bank, row}
  input  logic [W-1:0]   wr_value,    // row digits
  input  logic [W-1:0]   wr_care,     // 1 = digit is 0/1
  input  logic           wr_vacant,   // aging mode: erase (mark vacant)
  // search
  input  logic           srch,        // start a search
  input  logic [DXW-1:0] srch_id,     // table ID (DX pins)
  input  logic           age_query,   // aging query instead of lookup
  input  logic [8*W-1:0] key,         // search key (72 bits per row)
  input  logic [8*W-1:0] kcare,       // 1 = key bit compared
  output logic           res_vld,     // result valid (t+3)
  output logic           res_hit,     // an entry matched
  output logic [AW-1:0]  res_addr,    // matching address
  output logic [BKW:0]   banks_on     // banks searched for this result
);
  // ---------------- stage 1: DX ----------------
  logic [BANKS-1:0] bank_en, en_q;
  logic             s1, s2, age_q;
  logic [8*W-1:0]   key_q, kcare_q;

  tc18_dx #(.BANKS(BANKS), .DXW(DXW)) u_dx (
    .clk(clk), .rst_n(rst_n), .dx_we(dx_we), .dx_bank(dx_bank), .dx_value(dx_value),
    .dx_care(dx_care), .srch_id(srch_id), .bank_en(bank_en));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0; s2 <= 1'b0; en_q <= '0; age_q <= 1'b0;
    end else begin
      s1    <= srch;
      s2    <= s1;
      en_q  <= srch ? bank_en : '0;
      age_q <= age_query;
    end
  end
  always_ff @(posedge clk) begin
    key_q   <= key;
    kcare_q <= kcare;
  end

  // ---------------- stage 2: banks ----------------
  logic [BANKS-1:0] bhit;
  logic [RW-1:0]    brow [BANKS];
  logic [BKW:0]     on_q;

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    tc18_bank #(.ROWS(ROWS), .W(W)) u_bank (
      .clk(clk), .rst_n(rst_n), .aging_en(aging_en), .wmode(wmode),
      .wr_en(wr_en && (wr_addr[AW-1:RW] == BKW'(b))), .wr_row(wr_addr[RW-1:0]),
      .wr_value(wr_value), .wr_care(wr_care), .wr_vacant(wr_vacant),
      .srch(s1 && en_q[b]), .age_query(age_q), .key(key_q), .kcare(kcare_q),
      .res_hit(bhit[b]), .res_row(brow[b]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) on_q <= '0;
    else        on_q <= (BKW+1)'($countones(s1 ? en_q : '0));
  end

  // ---------------- global priority ----------------
  logic           g_hit, g_multi;  // g_multi: several banks hit, not brought out
  logic [BKW-1:0] win_bank;
  prio_enc #(.N(BANKS)) u_pe (.req(bhit), .hit(g_hit), .multi(g_multi), .idx(win_bank));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_vld <= 1'b0; res_hit <= 1'b0; res_addr <= '0; banks_on <= '0;
    end else begin
      res_vld  <= s2;
      res_hit  <= s2 && g_hit;
      res_addr <= {win_bank, brow[win_bank]};
      banks_on <= on_q;
    end
  end
endmodule
