// One bank of the 18 Mb TCAM: ROWS rows of W ternary bits (X/Y cells).
//
// Cell coding: "0" is X=1,Y=0, "1" is X=0,Y=1, "x" is X=0,Y=0.  A row
// mismatches when a compared key bit is 1 where X=1 or 0 where Y=1.
// Entry width: wmode 0..3 chains 1, 2, 4 or 8 consecutive rows into one
// 72/144/288/576-bit entry; row j of a group is compared with key segment j,
// and the entry matches when all its rows do.
// Bit <0> of every row with aging_en=1 (vacant/occupied and aging):
//   X0 = 1 means vacant.  Reset sets X0=1, Y0=0 in all rows; a write stores
//   X0=0 (occupied), Y0=0 (not hit yet); wr_vacant erases the row (X0=1).
//   A normal search compares X0 with 0, so vacant rows never hit, and ignores
//   Y0; every matching row then has Y0 set to 1 (hit memorised from the match
//   line).  An aging query (age_query=1, all other bits masked by the caller)
//   compares X0 and Y0 with 0 and finds rows that are occupied but were never
//   hit since they were written, the candidates for removal.
// With aging_en=0 bit <0> is an ordinary ternary bit.
// Timing: srch in cycle t, registered result (lowest matching entry's first
// row) in cycle t+1.  A bank whose srch is low does no compare and no
// update (its DX did not match).
// Default ROWS is 256 (the document's bank has 16K rows): larger banks
// exceed the elaboration tools' loop limit.
module tc18_bank #(
  parameter int ROWS  = 256,
  parameter int W    = 72,
  parameter int RW   = $clog2(ROWS)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           aging_en,     // bit<0> is vacant/aging indicator
  input  logic [1:0]     wmode,        // entry = 1<<wmode rows
  input  logic           wr_en,        // write a row
  input  logic [RW-1:0]  wr_row,       // row index
  input  logic [W-1:0]   wr_value,     // row digits
  input  logic [W-1:0]   wr_care,      // 1 = digit is 0/1, 0 = x
  input  logic           wr_vacant,    // aging mode: mark row vacant instead
  input  logic           srch,         // search this bank
  input  logic           age_query,    // aging query search
  input  logic [8*W-1:0] key,          // search key, segment j for row j
  input  logic [8*W-1:0] kcare,        // 1 = key bit compared
  output logic           res_hit,      // an entry matched (t+1)
  output logic [RW-1:0]  res_row       // first row of the best entry
);
  logic [W-1:1] xc [ROWS];
  logic [W-1:1] yc [ROWS];
  logic [ROWS-1:0] x0, y0;

  // ---------------- row compare ----------------
  logic [ROWS-1:0] rm, gm;
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      int seg;
      logic [W-1:0] k, c;
      seg = r % (1 << wmode);
      k = key[seg*W +: W];
      c = kcare[seg*W +: W];
      rm[r] = (((k[W-1:1] & xc[r]) | (~k[W-1:1] & yc[r])) & c[W-1:1]) == '0;
      if (aging_en) begin
        rm[r] = rm[r] && !x0[r] && !(age_query && y0[r]);
      end else begin
        rm[r] = rm[r] && !(c[0] && ((k[0] && x0[r]) || (!k[0] && y0[r])));
      end
    end
    // entry match: all rows of the group
    for (int r = 0; r < ROWS; r++) begin
      int g0;
      g0 = r - (r % (1 << wmode));
      gm[r] = 1'b1;
      for (int j = 0; j < 8; j++)
        if (j < (1 << wmode)) gm[r] = gm[r] && rm[g0 + j];
    end
  end

  // ---------------- storage, aging update ----------------
  always_ff @(posedge clk) begin
    if (wr_en) begin
      xc[wr_row] <= wr_care[W-1:1] & ~wr_value[W-1:1];
      yc[wr_row] <= wr_care[W-1:1] &  wr_value[W-1:1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x0 <= '1;
      y0 <= '0;
    end else begin
      if (srch && aging_en && !age_query)
        y0 <= y0 | gm;
      if (wr_en) begin
        if (aging_en) begin
          x0[wr_row] <= wr_vacant;
          y0[wr_row] <= 1'b0;
        end else begin
          x0[wr_row] <= wr_care[0] & ~wr_value[0];
          y0[wr_row] <= wr_care[0] &  wr_value[0];
        end
      end
    end
  end

  // ---------------- local priority ----------------
  logic [ROWS-1:0] first;
  logic            pe_hit, pe_multi;  // pe_multi not needed here
  logic [RW-1:0]   pe_idx;
  always_comb begin
    first = '0;
    for (int r = 0; r < ROWS; r++)
      first[r] = gm[r] && ((r % (1 << wmode)) == 0);
  end
  prio_enc #(.N(ROWS)) u_pe (.req(first), .hit(pe_hit), .multi(pe_multi), .idx(pe_idx));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_hit <= 1'b0;
      res_row <= '0;
    end else begin
      res_hit <= srch && pe_hit;
      res_row <= pe_idx;
    end
  end
endmodule
