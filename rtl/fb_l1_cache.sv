// L1 SRAM pixel cache between the pixel ALU and the frame-buffer DRAM.
//
// Direct-mapped, LINES lines of one DRAM block (8 pixels) each, with a
// valid and a dirty bit per line.  The pixel side has one read port
// (rd_addr, data one clock later) and one write port (wr_*), so the ALU can
// read a source pixel and write a result pixel in the same clock.
// lk_addr/lk_hit is a combinational presence check used before a pixel is
// accepted.
// Miss handling: fill_start (with fill_addr) is given only when no pixel is
// in flight.  One clock later the cache issues a single DRAM request that
// reads the missing block and, if the victim line is dirty, writes it back
// in the same cycle over the read-modify-write bus.  When rsp_vld returns
// the block is installed clean and fill_busy drops; the lookup hits from
// the next clock.  inv_all drops every line without write-back (used when
// the screen is cleared in DRAM).
// The line count and the direct mapping are this design's choices.
module fb_l1_cache
  import fb_pkg::*;
#(
  parameter int AW    = 20,          // pixel address width
  parameter int LINES = 32,
  parameter int LW    = $clog2(LINES),
  parameter int BAW   = AW - 3,      // block address width
  parameter int TW    = BAW - LW     // tag width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inv_all,
  input  logic [AW-1:0]    lk_addr,   // presence check
  output logic             lk_hit,
  input  logic [AW-1:0]    rd_addr,   // pixel read
  output pixel_t           rd_data,   // one clock later
  input  logic             wr_en,     // pixel write (marks the line dirty)
  input  logic [AW-1:0]    wr_addr,
  input  pixel_t           wr_data,
  input  logic             fill_start,
  input  logic [AW-1:0]    fill_addr,
  output logic             fill_busy,
  output logic             m_rd_en,   // DRAM block read
  output logic [BAW-1:0]   m_rd_blk,
  output logic             m_wr_en,   // DRAM block write-back
  output logic [BAW-1:0]   m_wr_blk,
  output logic [BLK_W-1:0] m_wr_data,
  input  logic             m_rsp_vld,
  input  logic [BLK_W-1:0] m_rd_data,
  output logic             miss_ev,   // a fill was started
  output logic             wb_ev      // a dirty line was written back
);
  pixel_t        data  [LINES*BLK_PIX];
  logic [TW-1:0] tag   [LINES];
  logic [LINES-1:0] valid, dirty;

  logic          waiting;
  logic [LW-1:0] f_line;
  logic [TW-1:0] f_tag;

  function automatic logic [LW-1:0] line_of(input logic [AW-1:0] a);
    return a[3 +: LW];
  endfunction
  function automatic logic [TW-1:0] tag_of(input logic [AW-1:0] a);
    return a[AW-1 -: TW];
  endfunction

  assign lk_hit    = valid[line_of(lk_addr)] && tag[line_of(lk_addr)] == tag_of(lk_addr);
  assign fill_busy = m_rd_en || waiting;
  assign miss_ev   = fill_start && !fill_busy;
  assign wb_ev     = m_rd_en && m_wr_en;

  always_ff @(posedge clk) rd_data <= data[rd_addr[0 +: LW+3]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid   <= '0;
      dirty   <= '0;
      m_rd_en <= 1'b0;
      m_wr_en <= 1'b0;
      waiting <= 1'b0;
    end else begin
      m_rd_en <= 1'b0;
      m_wr_en <= 1'b0;
      if (inv_all) begin
        valid <= '0;
        dirty <= '0;
      end
      if (wr_en) dirty[line_of(wr_addr)] <= 1'b1;
      if (fill_start && !fill_busy) begin
        m_rd_en <= 1'b1;
        m_wr_en <= valid[line_of(fill_addr)] && dirty[line_of(fill_addr)];
      end
      if (m_rd_en) waiting <= 1'b1;
      if (waiting && m_rsp_vld) begin
        waiting       <= 1'b0;
        valid[f_line] <= 1'b1;
        dirty[f_line] <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) data[wr_addr[0 +: LW+3]] <= wr_data;
    if (fill_start && !fill_busy) begin
      f_line   <= line_of(fill_addr);
      f_tag    <= tag_of(fill_addr);
      m_rd_blk <= fill_addr[AW-1:3];
      m_wr_blk <= {tag[line_of(fill_addr)], line_of(fill_addr)};
      for (int i = 0; i < BLK_PIX; i++)
        m_wr_data[i*PIX_W +: PIX_W] <= data[{line_of(fill_addr), 3'(i)}];
    end
    if (waiting && m_rsp_vld) begin
      tag[f_line] <= f_tag;
      for (int i = 0; i < BLK_PIX; i++)
        data[{f_line, 3'(i)}] <= m_rd_data[i*PIX_W +: PIX_W];
    end
  end
endmodule
