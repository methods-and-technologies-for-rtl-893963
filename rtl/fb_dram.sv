// Multi-bank frame-buffer DRAM with sense-amplifier page and DUP.
//
// BANKS banks of ROWS rows; a row (page) holds PAGE_BLKS blocks of 512 bits
// (8 pixels).  The default 4 x 1024 x 10,240 bits is 40 Mbit.  A block
// address is {bank, row, col}; columns at or above PAGE_BLKS are not backed
// (writes ignored, reads return zero).
//
// Block port (read-modify-write bus): one request per clock may carry a
// block read (global bus read) and a block write (global bus write) at the
// same time, so a cache line can be filled and a dirty line written back in
// the same cycle.  Read data appears on rd_data with rsp_vld one clock
// after the request.  An access opens its row in the bank's sense
// amplifiers (the page); a write to the open row updates the page too.
// When read and write address the same bank, the read's row is the one
// left open.
//
// DUP: dup_start copies each bank's open page into dup_rows consecutive
// rows starting at dup_row0, in all banks at once, one row per clock, so
// 4 x 10,240 bits are written per clock (used to clear the screen).
// Requests must not be issued while dup_busy is high.
// Timing choices (one-clock read, one row per clock for DUP) are this
// design's; the array itself has no refresh or timing model.
// Default ROWS is 64 (the document's banks have 1024 rows, 40 Mbit in all),
// which keeps elaboration of the array short.
module fb_dram
  import fb_pkg::*;
#(
  parameter int BANKS     = 4,
  parameter int ROWS      = 64,
  parameter int PAGE_BLKS = 20,
  parameter int BKW       = (BANKS > 1) ? $clog2(BANKS) : 1,
  parameter int RW        = $clog2(ROWS),
  parameter int CLW       = $clog2(PAGE_BLKS),
  parameter int BAW       = BKW + RW + CLW,
  parameter int PAGE_W    = PAGE_BLKS * BLK_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_en,      // block read request
  input  logic [BAW-1:0]   rd_blk,     // {bank,row,col}
  input  logic             wr_en,      // block write request
  input  logic [BAW-1:0]   wr_blk,     // {bank,row,col}
  input  logic [BLK_W-1:0] wr_data,    // 8 pixels
  output logic             rsp_vld,    // read data valid (request + 1)
  output logic [BLK_W-1:0] rd_data,
  input  logic             dup_start,  // start page duplication
  input  logic [RW-1:0]    dup_row0,   // first target row
  input  logic [RW:0]      dup_rows,   // number of rows
  output logic             dup_busy,
  output logic             dup_ev      // one row per bank copied this clock
);
  logic [PAGE_W-1:0] mem [BANKS][ROWS];
  logic [PAGE_W-1:0] sa  [BANKS];

  logic [RW-1:0] dup_row;
  logic [RW:0]   dup_left;

  logic [BKW-1:0] rb, wb;
  logic [RW-1:0]  rr, wrr;
  logic [CLW-1:0] rc, wc;
  assign {rb, rr, rc} = rd_blk;
  assign {wb, wrr, wc} = wr_blk;

  assign dup_busy = (dup_left != 0);
  assign dup_ev   = dup_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rsp_vld <= 1'b0;
    else        rsp_vld <= rd_en;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dup_left <= '0;
      dup_row  <= '0;
    end else if (dup_start && !dup_busy) begin
      dup_left <= dup_rows;
      dup_row  <= dup_row0;
    end else if (dup_busy) begin
      dup_left <= dup_left - 1'b1;
      dup_row  <= dup_row + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    logic [PAGE_W-1:0] pg;
    if (dup_busy) begin
      for (int b = 0; b < BANKS; b++) mem[b][dup_row] <= sa[b];
    end else begin
      if (rd_en) begin
        if (32'(rc) < PAGE_BLKS) rd_data <= mem[rb][rr][rc*BLK_W +: BLK_W];
        else                     rd_data <= '0;
      end
      if (wr_en && 32'(wc) < PAGE_BLKS) begin
        mem[wb][wrr][wc*BLK_W +: BLK_W] <= wr_data;
        if (!(rd_en && rb == wb)) begin
          pg = mem[wb][wrr];
          pg[wc*BLK_W +: BLK_W] = wr_data;
          sa[wb] <= pg;
        end
      end
      if (rd_en) begin
        pg = mem[rb][rr];
        if (wr_en && wb == rb && wrr == rr && 32'(wc) < PAGE_BLKS)
          pg[wc*BLK_W +: BLK_W] = wr_data;
        sa[rb] <= pg;
      end
    end
  end
endmodule
